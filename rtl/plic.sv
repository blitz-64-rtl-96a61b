// plic: Platform-Level Interrupt Controller for a multicore Blitz-64 system.
//
// Every shared device has one request line into the PLIC; every core has one
// "PLIC Interrupt" line out of it. Software programs EDGE_TRIGGERED_ARRAY (one bit
// per device) and ENABLE_ARRAY (one doubleword per core, one bit per device), then
// each core claims by LOADing its CLAIM_ARRAY word and retires by STOREing to it.
//
// Per device the PLIC keeps a "claimed" flag with the claiming core, and, for
// edge-triggered devices, a saturating counter of unclaimed requests. A device is
// pending when it is not claimed and either (edge) its counter is non-zero or
// (level) its request line is high in this cycle. A core's interrupt line is high
// while any pending device is enabled for it, so it drops at every other core as
// soon as one core claims the only pending device.
//
// A claim (LOAD of CLAIM_ARRAY[c]) returns -1 if core c already holds an unretired
// claim or no enabled device is pending; otherwise it returns the lowest-numbered
// enabled pending device d, marks d claimed by c and decrements d's counter. A
// retire (STORE, value ignored) frees the device core c holds. The bus serialises
// accesses, so of several cores racing to claim, exactly one wins.
//
// Register map (byte offsets): 0x000 EDGE_TRIGGERED_ARRAY, 0x008 + 8c ENABLE_ARRAY[c],
// 0x408 + 8c CLAIM_ARRAY[c]. EDGE and ENABLE words read back what was stored.
//
// Follows the document: register map, claim/retire rules, one claim per device and
// per core, edge counters decremented at claim (the emulator's bookkeeping; the
// main text decrements at retire, which gives the same interrupts), edge-triggered
// counting once per cycle the line is high (same-clock-domain devices). This
// design's choices: 16-bit saturating counters, lowest device number wins a claim,
// late_config flags a write to EDGE/ENABLE after the first CLAIM access (the
// emulator prints a warning there), irq outputs are registered (one cycle delay).
//
// Timing: a request is taken in the cycle req.valid is high; LOAD data is on rdata
// the next cycle; irq reflects state one cycle after any change.
module plic
  import blitz_io_pkg::*;
#(
  parameter int unsigned NUM_CORES = 128,
  parameter int unsigned NUM_DEVS  = 64,
  parameter int unsigned CNT_W     = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  io_req_t              req,
  output logic [DW-1:0]        rdata,
  input  logic [NUM_DEVS-1:0]  dev_irq,     // request lines from the devices
  output logic [NUM_CORES-1:0] core_irq,    // "PLIC Interrupt" to each core
  output logic                 late_config  // sticky: setup written after first claim
);
  localparam int unsigned CORE_W = (NUM_CORES > 1) ? $clog2(NUM_CORES) : 1;
  localparam int unsigned DEV_W  = (NUM_DEVS > 1)  ? $clog2(NUM_DEVS)  : 1;
  localparam logic [PAGE_OFF_W-1:0] ENABLE_OFF = 14'h008;
  localparam logic [PAGE_OFF_W-1:0] CLAIM_OFF  = 14'h408;

  logic [NUM_DEVS-1:0] edge_trig;
  logic [NUM_DEVS-1:0] enable   [NUM_CORES];
  logic [CNT_W-1:0]    counter  [NUM_DEVS];
  logic [NUM_DEVS-1:0] claimed;                 // DEVICE_STATUS != -1
  logic [CORE_W-1:0]   owner    [NUM_DEVS];     // DEVICE_STATUS value
  logic [NUM_CORES-1:0] busy;                   // PROCESSING != -1
  logic [DEV_W-1:0]    proc_dev [NUM_CORES];    // PROCESSING value
  logic                init_done;

  // ---------------- pending devices ----------------
  logic [NUM_DEVS-1:0] pending;
  always_comb begin
    for (int d = 0; d < NUM_DEVS; d++)
      pending[d] = !claimed[d] && (edge_trig[d] ? (counter[d] != '0) : dev_irq[d]);
  end

  // ---------------- address decode ----------------
  logic              is_edge, is_enable, is_claim;
  logic [PAGE_OFF_W-1:0] rel_en, rel_cl;
  logic [CORE_W-1:0] core_sel;
  assign rel_en    = req.off - ENABLE_OFF;
  assign rel_cl    = req.off - CLAIM_OFF;
  assign is_edge   = (req.off == '0);
  assign is_enable = (req.off >= ENABLE_OFF) && ((rel_en >> 3) < PAGE_OFF_W'(NUM_CORES));
  assign is_claim  = (req.off >= CLAIM_OFF)  && ((rel_cl >> 3) < PAGE_OFF_W'(NUM_CORES));
  always_comb begin
    core_sel = '0;
    if (is_enable) core_sel = rel_en[3 +: CORE_W];
    else if (is_claim) core_sel = rel_cl[3 +: CORE_W];
  end

  // Lowest-numbered pending device enabled for the addressed core.
  logic [NUM_DEVS-1:0] cand;
  logic                found;
  logic [DEV_W-1:0]    found_dev;
  assign cand = pending & enable[core_sel];
  always_comb begin
    found     = 1'b0;
    found_dev = '0;
    for (int d = NUM_DEVS - 1; d >= 0; d--)
      if (cand[d]) begin
        found     = 1'b1;
        found_dev = DEV_W'(d);
      end
  end

  logic do_claim, do_retire;
  assign do_claim  = req.valid && !req.write && is_claim && !busy[core_sel] && found;
  assign do_retire = req.valid &&  req.write && is_claim &&  busy[core_sel];

  // ---------------- state ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      edge_trig   <= '0;
      claimed     <= '0;
      busy        <= '0;
      init_done   <= 1'b0;
      late_config <= 1'b0;
      rdata       <= '0;
      for (int c = 0; c < NUM_CORES; c++) begin
        enable[c]   <= '0;
        proc_dev[c] <= '0;
      end
      for (int d = 0; d < NUM_DEVS; d++) begin
        counter[d] <= '0;
        owner[d]   <= '0;
      end
    end else begin
      // Edge-triggered request counting: one count per cycle the line is high.
      for (int d = 0; d < NUM_DEVS; d++) begin
        logic inc, dec;
        inc = edge_trig[d] && dev_irq[d] && (counter[d] != '1);
        dec = do_claim && (found_dev == DEV_W'(d)) && edge_trig[d];
        if (inc && !dec)      counter[d] <= counter[d] + 1'b1;
        else if (dec && !inc) counter[d] <= counter[d] - 1'b1;
      end

      if (req.valid) begin
        if (is_claim) init_done <= 1'b1;
        if (req.write) begin
          if (is_edge) begin
            edge_trig <= req.wdata[NUM_DEVS-1:0];
            if (init_done) late_config <= 1'b1;
          end else if (is_enable) begin
            enable[core_sel] <= req.wdata[NUM_DEVS-1:0];
            if (init_done) late_config <= 1'b1;
          end
        end else begin
          if (is_edge)        rdata <= DW'(edge_trig);
          else if (is_enable) rdata <= DW'(enable[core_sel]);
          else if (is_claim)  rdata <= do_claim ? DW'(found_dev) : '1;
          else                rdata <= '0;
        end
      end

      if (do_claim) begin
        claimed[found_dev]  <= 1'b1;
        owner[found_dev]    <= core_sel;
        busy[core_sel]      <= 1'b1;
        proc_dev[core_sel]  <= found_dev;
      end
      if (do_retire) begin
        claimed[proc_dev[core_sel]] <= 1'b0;
        busy[core_sel]              <= 1'b0;
      end
    end
  end

  // ---------------- interrupt lines to the cores ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) core_irq <= '0;
    else
      for (int c = 0; c < NUM_CORES; c++)
        core_irq[c] <= |(pending & enable[c]);
  end

  // A device is claimed by at most one core: the owner recorded for a claimed
  // device must itself be busy with that device.
  property p_owner_consistent(int d);
    @(posedge clk) disable iff (!rst_n)
      claimed[d] |-> (busy[owner[d]] && proc_dev[owner[d]] == DEV_W'(d));
  endproperty
  for (genvar d = 0; d < NUM_DEVS; d++) begin : g_chk
    a_owner: assert property (p_owner_consistent(d));
  end

endmodule
