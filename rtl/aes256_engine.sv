// aes256_engine: AES-256 key expansion and single-block encryption/decryption
// (FIPS 197).
//
// key_start loads a 256-bit key and expands it into the 60-word round-key schedule
// w[0..59], one word per cycle (52 cycles), held in the engine until the next
// key_start; key_ready is high once the schedule is complete. start then encrypts
// (decrypt = 0) or decrypts (decrypt = 1) the 128-bit din, one round per cycle:
// encryption is AddRoundKey(0) then 14 rounds of SubBytes, ShiftRows, MixColumns
// (not in the last round) and AddRoundKey; decryption is the straightforward
// inverse cipher running the round keys backwards.
//
// Byte order is that of FIPS 197: the first byte of the block (and of the key) is
// bits [127:120] ([255:248]). The S-box and its inverse are computed at elaboration
// from their definition (multiplicative inverse in GF(2^8) followed by the affine
// map), not stored as typed-in tables.
//
// The document asks for AES-256 with a "prepare key" step that builds an internal
// round-key form; the iterative structure here is this design's choice. (The
// document's footnote counts 56 schedule words, Nb x Nr; the cipher uses
// Nb x (Nr+1) = 60, which is what is built.)
//
// Timing: key_start is taken when busy is low, done pulses 53 cycles later;
// start is taken when busy is low and key_ready is high, done pulses 15 cycles
// later with dout valid until the next operation.
module aes256_engine (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         key_start,
  input  logic [255:0] key,
  input  logic         start,
  input  logic         decrypt,
  input  logic [127:0] din,
  output logic         busy,
  output logic         key_ready,
  output logic         done,
  output logic [127:0] dout
);
  // ---------------- GF(2^8) helpers and S-box generation ----------------
  function automatic logic [7:0] xtime(input logic [7:0] x);
    return {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p = '0, aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] x, input int n);
    return (x << n) | (x >> (8 - n));
  endfunction

  // Forward S-box (inv = 0) or inverse S-box (inv = 1) as a packed table,
  // entry x at bits [8x +: 8].
  function automatic logic [2047:0] gen_sbox(input bit inv);
    logic [2047:0] t = '0;
    for (int x = 0; x < 256; x++) begin
      logic [7:0] b, sq, s;
      // b = x^254 = x^-1 (0 maps to 0), by square-and-multiply
      sq = 8'(x);
      b  = 8'h01;
      for (int k = 1; k < 8; k++) begin
        sq = gmul(sq, sq);          // x^(2^k)
        b  = gmul(b, sq);
      end
      if (x == 0) b = 8'h00;
      s = b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
      if (inv) t[8*int'(s) +: 8] = 8'(x);
      else     t[8*x +: 8] = s;
    end
    return t;
  endfunction

  localparam logic [2047:0] SBOX     = gen_sbox(1'b0);
  localparam logic [2047:0] INV_SBOX = gen_sbox(1'b1);

  function automatic logic [31:0] sub_word(input logic [31:0] x);
    return {SBOX[8*x[31:24] +: 8], SBOX[8*x[23:16] +: 8], SBOX[8*x[15:8] +: 8], SBOX[8*x[7:0] +: 8]};
  endfunction

  // Byte (row r, column c) of a state is bits [127 - 8*(4c+r) -: 8].
  function automatic logic [127:0] enc_round(input logic [127:0] s, input logic [127:0] rk,
                                             input bit last);
    logic [127:0] t;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)   // SubBytes + ShiftRows
        t[127 - 8*(4*c + r) -: 8] = SBOX[8*s[127 - 8*(4*((c + r) % 4) + r) -: 8] +: 8];
    if (!last)
      for (int c = 0; c < 4; c++) begin   // MixColumns
        {a0, a1, a2, a3} = t[127 - 32*c -: 32];
        t[127 - 32*c -: 32] = {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
                               a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
                               a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
                               xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
      end
    return t ^ rk;
  endfunction

  function automatic logic [127:0] dec_round(input logic [127:0] s, input logic [127:0] rk,
                                             input bit last);
    logic [127:0] t;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)   // InvShiftRows + InvSubBytes
        t[127 - 8*(4*c + r) -: 8] = INV_SBOX[8*s[127 - 8*(4*((c + 4 - r) % 4) + r) -: 8] +: 8];
    t = t ^ rk;
    if (!last)
      for (int c = 0; c < 4; c++) begin   // InvMixColumns
        {a0, a1, a2, a3} = t[127 - 32*c -: 32];
        t[127 - 32*c -: 32] = {gmul(a0, 8'h0e) ^ gmul(a1, 8'h0b) ^ gmul(a2, 8'h0d) ^ gmul(a3, 8'h09),
                               gmul(a0, 8'h09) ^ gmul(a1, 8'h0e) ^ gmul(a2, 8'h0b) ^ gmul(a3, 8'h0d),
                               gmul(a0, 8'h0d) ^ gmul(a1, 8'h09) ^ gmul(a2, 8'h0e) ^ gmul(a3, 8'h0b),
                               gmul(a0, 8'h0b) ^ gmul(a1, 8'h0d) ^ gmul(a2, 8'h09) ^ gmul(a3, 8'h0e)};
      end
    return t;
  endfunction

  // ---------------- state ----------------
  typedef enum logic [1:0] {IDLE, EXPAND, ENC, DEC} state_e;
  state_e      state;
  logic [31:0] w [60];
  logic [5:0]  wi;           // next schedule word to compute
  logic [7:0]  rcon;
  logic [3:0]  round;
  logic [127:0] st;

  function automatic logic [127:0] rkey(input logic [31:0] ws [60], input int r);
    return {ws[4*r], ws[4*r+1], ws[4*r+2], ws[4*r+3]};
  endfunction

  logic [31:0] temp, w_new;
  always_comb begin
    temp = w[wi - 6'd1];
    if (wi[2:0] == 3'd0)      temp = sub_word({temp[23:0], temp[31:24]}) ^ {rcon, 24'h0};
    else if (wi[2:0] == 3'd4) temp = sub_word(temp);
    w_new = w[wi - 6'd8] ^ temp;
  end

  logic [127:0] st_next;
  always_comb begin
    st_next = st;
    if (state == ENC)      st_next = enc_round(st, rkey(w, int'(round)), round == 4'd14);
    else if (state == DEC) st_next = dec_round(st, rkey(w, int'(round)), round == 4'd0);
  end

  assign busy = (state != IDLE);
  assign dout = st;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= IDLE;
      key_ready <= 1'b0;
      done      <= 1'b0;
      wi        <= '0;
      rcon      <= 8'h01;
      round     <= '0;
      st        <= '0;
      for (int i = 0; i < 60; i++) w[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (key_start) begin
          for (int i = 0; i < 8; i++) w[i] <= key[255 - 32*i -: 32];
          wi        <= 6'd8;
          rcon      <= 8'h01;
          key_ready <= 1'b0;
          state     <= EXPAND;
        end else if (start && key_ready) begin
          if (decrypt) begin
            st    <= din ^ rkey(w, 14);
            round <= 4'd13;
            state <= DEC;
          end else begin
            st    <= din ^ rkey(w, 0);
            round <= 4'd1;
            state <= ENC;
          end
        end
        EXPAND: begin
          w[wi] <= w_new;
          if (wi[2:0] == 3'd0) rcon <= xtime(rcon);
          wi <= wi + 1'b1;
          if (wi == 6'd59) begin
            state     <= IDLE;
            key_ready <= 1'b1;
            done      <= 1'b1;
          end
        end
        ENC: begin
          st    <= st_next;
          round <= round + 1'b1;
          if (round == 4'd14) begin state <= IDLE; done <= 1'b1; end
        end
        DEC: begin
          st    <= st_next;
          round <= round - 1'b1;
          if (round == 4'd0) begin state <= IDLE; done <= 1'b1; end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
