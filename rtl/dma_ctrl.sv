// dma_ctrl: Blitz DMA controller with crypto-engine commands.
//
// Software stores the arguments (DMA_START_ADDR, DMA_TARGET_ADDR, DMA_BYTECOUNT,
// DMA_AES_KEY_0..3) and then a command code into DMA_COMMAND. The controller works
// alone on physical memory through its memory master port, shows DMA_BUSY in
// DMA_STATUS meanwhile, and pulses irq (the core's "DMA Complete Interrupt") when it
// has finished, whatever the command. It runs one command at a time; a command
// stored while busy is ignored.
//
// Commands:
//   DMA_MOVE        copy BYTECOUNT/8 doublewords from START to TARGET
//   DMA_ZERO        clear BYTECOUNT/8 doublewords from START
//   SHA256_INITIALIZE / _CHUNK / _FINALIZE, SHA256_SIMPLE (all three in one)
//                   hash a message given as one or more chunks; a chunk may hold any
//                   number of bytes, so bytes are gathered one per cycle into a
//                   64-byte block buffer that carries over between chunks; FINALIZE
//                   appends 0x80, zeros and the 64-bit bit length; the digest is read
//                   from DMA_SHA256_0..3 (0 holds the most significant 64 bits)
//   AES256_PREPARE  expand DMA_AES_KEY_0..3 (KEY_0 = most significant) into round keys
//   AES256_EN/DE_SIMPLE, _INITIAL, _MIDDLE, _FINAL
//                   encrypt or decrypt BYTECOUNT/16 blocks from START to TARGET
//
// Follows the document: register offsets, command and status codes, address and
// byte-count rules (low 3 bits of addresses ignored; low 3 bits of the count ignored
// for MOVE/ZERO, low 4 for AES, none for SHA), interrupt on every completion.
// This design's own choices, where the document is silent:
//  * Byte order is big-endian: the first message byte of a doubleword is bits [63:56].
//  * The AES chunk commands chain blocks in CBC mode with an all-zero initial value:
//    SIMPLE and INITIAL start a new chain, MIDDLE and FINAL continue it (FINAL adds
//    no padding; the byte count is already a multiple of 16).
//  * An AES encrypt/decrypt before any PREPARE completes at once without touching
//    memory. Unknown command codes also complete at once.
//  * Reads of write-only registers return 0.
// Addresses are 35 bits (the physical/virtual bit is 0) and are zero-extended onto
// the 44-bit memory port.
//
// Timing: each memory access is one request/response pair (no overlap); MOVE costs
// two accesses per doubleword, SHA one cycle per byte plus 65 cycles per block, AES
// four accesses plus 15 cycles per 16-byte block, PREPARE 53 cycles.
module dma_ctrl
  import blitz_io_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  io_req_t       req,
  output logic [DW-1:0] rdata,
  output logic          irq,
  // memory master port
  output logic          mem_req_valid,
  output mem_req_t      mem_req,
  input  logic          mem_req_ready,
  input  logic          mem_rsp_valid,
  input  logic [DW-1:0] mem_rsp_rdata
);
  localparam logic [255:0] SHA_IV =
    256'h6a09e667_bb67ae85_3c6ef372_a54ff53a_510e527f_9b05688c_1f83d9ab_5be0cd19;

  typedef enum logic [4:0] {
    S_IDLE, S_MV_RD, S_MV_WR, S_ZR_WR,
    S_SH_RD, S_SH_FEED, S_SH_COMP, S_SH_PAD,
    S_AES_KEY, S_AE_RD0, S_AE_RD1, S_AE_RUN, S_AE_WR0, S_AE_WR1,
    S_FINISH
  } state_e;

  state_e        state, sh_ret;
  logic [34:0]   start_addr, target_addr;
  logic [DW-1:0] bytecount;
  logic [DW-1:0] aes_key [4];

  logic [34:0]   src, dst;
  logic [DW-1:0] remaining;
  logic [DW-1:0] data_q;
  logic          pending;     // a memory request is outstanding

  // SHA-256 state
  logic [255:0]  hash;
  logic [511:0]  sbuf;
  logic [5:0]    fill;        // bytes in sbuf
  logic [63:0]   total_bits;
  logic [2:0]    hold_k;      // next byte of data_q to take
  logic [3:0]    hold_n;      // bytes of data_q that belong to the message
  logic [1:0]    pad_phase;   // 0: 0x80, 1: zeros, 2: length
  logic [2:0]    len_k;
  logic          sh_final;    // SIMPLE: finalize after the chunk
  logic          sha_go, sha_busy, sha_done;
  logic [255:0]  sha_out;

  // AES state
  logic          aes_key_go, aes_go, aes_busy, aes_key_ready, aes_done;
  logic          aes_dec;
  logic [127:0]  aes_in, aes_out, chain, blk;

  sha256_engine u_sha (
    .clk, .rst_n, .start(sha_go), .block(sbuf), .h_in(hash),
    .busy(sha_busy), .done(sha_done), .h_out(sha_out)
  );

  aes256_engine u_aes (
    .clk, .rst_n, .key_start(aes_key_go), .key({aes_key[0], aes_key[1], aes_key[2], aes_key[3]}),
    .start(aes_go), .decrypt(aes_dec), .din(aes_in), .busy(aes_busy),
    .key_ready(aes_key_ready), .done(aes_done), .dout(aes_out)
  );

  assign aes_in = aes_dec ? blk : (blk ^ chain);

  // ---------------- register interface ----------------
  logic busy;
  assign busy = (state != S_IDLE);

  logic wr_cmd;
  assign wr_cmd = req.valid && req.write && req.off == DMA_COMMAND && !busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      start_addr  <= '0;
      target_addr <= '0;
      bytecount   <= '0;
      for (int i = 0; i < 4; i++) aes_key[i] <= '0;
      rdata <= '0;
    end else if (req.valid) begin
      if (req.write) begin
        if (!busy) begin
          unique case (req.off)
            DMA_START_ADDR:          start_addr  <= req.wdata[34:0];
            DMA_TARGET_ADDR:         target_addr <= req.wdata[34:0];
            DMA_BYTECOUNT:           bytecount   <= req.wdata;
            DMA_AES_KEY_0:           aes_key[0]  <= req.wdata;
            DMA_AES_KEY_0 + 14'h08:  aes_key[1]  <= req.wdata;
            DMA_AES_KEY_0 + 14'h10:  aes_key[2]  <= req.wdata;
            DMA_AES_KEY_0 + 14'h18:  aes_key[3]  <= req.wdata;
            default: ;
          endcase
        end
      end else begin
        unique case (req.off)
          DMA_STATUS:             rdata <= busy ? DMA_BUSY : DMA_OK;
          DMA_SHA256_0:           rdata <= hash[255:192];
          DMA_SHA256_0 + 14'h08:  rdata <= hash[191:128];
          DMA_SHA256_0 + 14'h10:  rdata <= hash[127:64];
          DMA_SHA256_0 + 14'h18:  rdata <= hash[63:0];
          default:                rdata <= '0;
        endcase
      end
    end
  end

  // ---------------- memory master ----------------
  always_comb begin
    mem_req_valid = 1'b0;
    mem_req       = '{write: 1'b0, addr: '0, wdata: '0};
    unique case (state)
      S_MV_RD:  begin mem_req_valid = 1'b1; mem_req.addr = PADDR_W'(src); end
      S_MV_WR:  begin mem_req_valid = 1'b1; mem_req.write = 1'b1; mem_req.addr = PADDR_W'(dst); mem_req.wdata = data_q; end
      S_ZR_WR:  begin mem_req_valid = 1'b1; mem_req.write = 1'b1; mem_req.addr = PADDR_W'(src); end
      S_SH_RD:  begin mem_req_valid = (remaining != '0); mem_req.addr = PADDR_W'(src); end
      S_AE_RD0: begin mem_req_valid = 1'b1; mem_req.addr = PADDR_W'(src); end
      S_AE_RD1: begin mem_req_valid = 1'b1; mem_req.addr = PADDR_W'(src + 35'd8); end
      S_AE_WR0: begin mem_req_valid = 1'b1; mem_req.write = 1'b1; mem_req.addr = PADDR_W'(dst); mem_req.wdata = chain[127:64]; end
      S_AE_WR1: begin mem_req_valid = 1'b1; mem_req.write = 1'b1; mem_req.addr = PADDR_W'(dst + 35'd8); mem_req.wdata = chain[63:0]; end
      default: ;
    endcase
    if (pending) mem_req_valid = 1'b0;
  end

  logic rsp;
  assign rsp = pending && mem_rsp_valid;

  // Next SHA byte and whether the buffer is full after it.
  logic [7:0] sh_byte;
  always_comb begin
    sh_byte = 8'h00;
    if (state == S_SH_FEED) sh_byte = data_q[63 - 8*hold_k -: 8];
    else if (pad_phase == 2'd0) sh_byte = 8'h80;
    else if (pad_phase == 2'd2) sh_byte = total_bits[63 - 8*len_k -: 8];
  end

  // ---------------- control ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      sh_ret     <= S_IDLE;
      src        <= '0;
      dst        <= '0;
      remaining  <= '0;
      data_q     <= '0;
      pending    <= 1'b0;
      hash       <= SHA_IV;
      sbuf       <= '0;
      fill       <= '0;
      total_bits <= '0;
      hold_k     <= '0;
      hold_n     <= '0;
      pad_phase  <= '0;
      len_k      <= '0;
      sh_final   <= 1'b0;
      sha_go     <= 1'b0;
      aes_key_go <= 1'b0;
      aes_go     <= 1'b0;
      aes_dec    <= 1'b0;
      chain      <= '0;
      blk        <= '0;
      irq        <= 1'b0;
    end else begin
      irq        <= 1'b0;
      sha_go     <= 1'b0;
      aes_key_go <= 1'b0;
      aes_go     <= 1'b0;
      if (mem_req_valid && mem_req_ready) pending <= 1'b1;
      if (rsp) pending <= 1'b0;

      unique case (state)
        S_IDLE: if (wr_cmd) begin
          src <= {start_addr[34:3], 3'b000};
          dst <= {target_addr[34:3], 3'b000};
          sh_final <= 1'b0;
          if (req.wdata[DW-1:4] != '0) state <= S_FINISH;          // unknown code
          else unique case (dma_cmd_e'(req.wdata[3:0]))
            CMD_MOVE: begin
              remaining <= bytecount >> 3;
              state     <= (bytecount[DW-1:3] == '0) ? S_FINISH : S_MV_RD;
            end
            CMD_ZERO: begin
              remaining <= bytecount >> 3;
              state     <= (bytecount[DW-1:3] == '0) ? S_FINISH : S_ZR_WR;
            end
            CMD_SHA256_INIT: begin
              hash <= SHA_IV; fill <= '0; total_bits <= '0; state <= S_FINISH;
            end
            CMD_SHA256_SIMPLE: begin
              hash <= SHA_IV; fill <= '0; total_bits <= '0;
              remaining <= bytecount; sh_final <= 1'b1; state <= S_SH_RD;
            end
            CMD_SHA256_CHUNK: begin
              remaining <= bytecount; state <= S_SH_RD;
            end
            CMD_SHA256_FINAL: begin
              pad_phase <= 2'd0; len_k <= '0; state <= S_SH_PAD;
            end
            CMD_AES256_PREPARE: begin
              aes_key_go <= 1'b1; state <= S_AES_KEY;
            end
            CMD_AES_EN_SIMPLE, CMD_AES_EN_INITIAL, CMD_AES_EN_MIDDLE, CMD_AES_EN_FINAL,
            CMD_AES_DE_SIMPLE, CMD_AES_DE_INITIAL, CMD_AES_DE_MIDDLE, CMD_AES_DE_FINAL: begin
              aes_dec   <= req.wdata[3:0] >= 4'd12;
              remaining <= bytecount >> 4;
              if (req.wdata[3:0] inside {4'd8, 4'd9, 4'd12, 4'd13}) chain <= '0;
              state <= (!aes_key_ready || bytecount[DW-1:4] == '0) ? S_FINISH : S_AE_RD0;
            end
            default: state <= S_FINISH;
          endcase
        end

        // ---- move / zero ----
        S_MV_RD: if (rsp) begin data_q <= mem_rsp_rdata; state <= S_MV_WR; end
        S_MV_WR: if (rsp) begin
          src <= src + 35'd8; dst <= dst + 35'd8; remaining <= remaining - 1'b1;
          state <= (remaining == 64'd1) ? S_FINISH : S_MV_RD;
        end
        S_ZR_WR: if (rsp) begin
          src <= src + 35'd8; remaining <= remaining - 1'b1;
          state <= (remaining == 64'd1) ? S_FINISH : S_ZR_WR;
        end

        // ---- SHA-256 ----
        S_SH_RD: if (remaining == '0) begin
          if (sh_final) begin pad_phase <= 2'd0; len_k <= '0; state <= S_SH_PAD; end
          else state <= S_FINISH;
        end else if (rsp) begin
          data_q <= mem_rsp_rdata;
          hold_k <= '0;
          hold_n <= (remaining >= 64'd8) ? 4'd8 : 4'(remaining);
          state  <= S_SH_FEED;
        end
        S_SH_FEED: begin
          sbuf[511 - 8*fill -: 8] <= sh_byte;
          fill       <= fill + 1'b1;
          total_bits <= total_bits + 64'd8;
          hold_k     <= hold_k + 1'b1;
          if (4'(hold_k) + 4'd1 == hold_n) begin
            src       <= src + 35'd8;
            remaining <= remaining - 64'(hold_n);
          end
          if (fill == 6'd63) begin
            sha_go <= 1'b1;
            sh_ret <= (4'(hold_k) + 4'd1 == hold_n) ? S_SH_RD : S_SH_FEED;
            state  <= S_SH_COMP;
          end else if (4'(hold_k) + 4'd1 == hold_n) state <= S_SH_RD;
        end
        S_SH_PAD: begin
          if (pad_phase == 2'd1 && fill == 6'd56) begin
            pad_phase <= 2'd2;
          end else begin
            sbuf[511 - 8*fill -: 8] <= sh_byte;
            fill <= fill + 1'b1;
            if (pad_phase == 2'd0) pad_phase <= 2'd1;
            if (pad_phase == 2'd2) len_k <= len_k + 1'b1;
            if (fill == 6'd63) begin
              sha_go <= 1'b1;
              sh_ret <= (pad_phase == 2'd2) ? S_FINISH : S_SH_PAD;
              state  <= S_SH_COMP;
            end
          end
        end
        S_SH_COMP: if (sha_done) begin
          hash  <= sha_out;
          state <= sh_ret;
        end

        // ---- AES-256 ----
        S_AES_KEY: if (aes_done) state <= S_FINISH;
        S_AE_RD0: if (rsp) begin blk[127:64] <= mem_rsp_rdata; state <= S_AE_RD1; end
        S_AE_RD1: if (rsp) begin
          blk[63:0] <= mem_rsp_rdata;
          aes_go    <= 1'b1;
          state     <= S_AE_RUN;
        end
        S_AE_RUN: if (aes_done) begin
          // chain now holds the output block until it is written; the next
          // chaining value is the ciphertext block in both directions.
          chain <= aes_dec ? (aes_out ^ chain) : aes_out;
          state <= S_AE_WR0;
        end
        S_AE_WR0: if (rsp) state <= S_AE_WR1;
        S_AE_WR1: if (rsp) begin
          if (aes_dec) chain <= blk;
          src <= src + 35'd16; dst <= dst + 35'd16; remaining <= remaining - 1'b1;
          state <= (remaining == 64'd1) ? S_FINISH : S_AE_RD0;
        end

        S_FINISH: begin
          irq   <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // One request outstanding at most: a new request is never offered while waiting.
  a_one_outstanding: assert property (@(posedge clk) disable iff (!rst_n) pending |-> !mem_req_valid);

endmodule
