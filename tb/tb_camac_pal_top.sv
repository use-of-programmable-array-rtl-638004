// tb_camac_pal_top: end-to-end test of both CAMAC PAL designs.
//
// Decoder side: the testbench plays a CAMAC dataway. Each cycle puts N, F,
// A and BUSY on the lines, then strobes S1 and S2, as a crate controller
// does. The five write strobes load five 24-bit registers of a stand-in
// module at the end of S1 (their rising edge); RD1 A0 gates register WT1 A0
// onto the read lines; the initialise output, from Z.S2 or XEQ A15, clears
// all five. The test writes, reads back and initialises, and at every phase
// checks X, the strobes and INIT against what the command should do.
//
// Mask register side: bit-set, bit-clear and initialise commands give a
// clock at S1 with SET and INIT held for the whole cycle, as the module's
// own decoder would. The test sets and clears mask bits, raises demands,
// reads the mask through the three-state pins and follows LAM.
//
// Each mechanism (X response, every strobe, read gating, Z and XEQ
// initialise, unaddressed cycle, mask set/clear/hold/initialise, LAM on and
// off, mask read enable and disable) is counted; one that never happened is
// a failure. The top is used with its default parameters.
module tb_camac_pal_top;
  import camac_pal_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #50 clk = ~clk;    // 100 ns phases of a dataway cycle

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("tb_camac_pal_top: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  dec_in_t    dec_pins;
  dec_out_t   dec_outs;
  logic       mask_clk, mask_set, mask_init, mask_readm_n;
  logic [3:1] mask_w, mask_dm, mask_m, mask_r, mask_r_oe;
  logic       mask_m_oe, mask_lam, mask_lam_oe;

  camac_pal_top dut (.*);

  // ------------------------------------------------------------------------
  // Stand-in module registers driven by the decoder outputs.
  // ------------------------------------------------------------------------
  logic [23:0] wdata;
  logic [23:0] reg10, reg11, reg20, reg21, reg22;
  logic [23:0] rdata;

  always @(posedge dec_outs.wt10 or negedge dec_outs.init)
    if (!dec_outs.init) reg10 <= '0; else reg10 <= wdata;
  always @(posedge dec_outs.wt11 or negedge dec_outs.init)
    if (!dec_outs.init) reg11 <= '0; else reg11 <= wdata;
  always @(posedge dec_outs.wt20 or negedge dec_outs.init)
    if (!dec_outs.init) reg20 <= '0; else reg20 <= wdata;
  always @(posedge dec_outs.wt21 or negedge dec_outs.init)
    if (!dec_outs.init) reg21 <= '0; else reg21 <= wdata;
  always @(posedge dec_outs.wt22 or negedge dec_outs.init)
    if (!dec_outs.init) reg22 <= '0; else reg22 <= wdata;
  assign rdata = dec_outs.rd10 ? '0 : reg10;

  // ------------------------------------------------------------------------
  // Mechanism counters
  // ------------------------------------------------------------------------
  typedef enum int {
    EV_X, EV_WT10, EV_WT11, EV_WT20, EV_WT21, EV_WT22, EV_RD, EV_INIT_Z,
    EV_INIT_XEQ, EV_UNADDR, EV_M_INIT, EV_M_SET, EV_M_CLEAR, EV_M_HOLD,
    EV_LAM_ON, EV_LAM_OFF, EV_READ_ON, EV_READ_OFF, EV_COUNT
  } ev_t;
  int ev[EV_COUNT];

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  // ------------------------------------------------------------------------
  // Dataway cycle for the decoder. Pins are active low.
  // ------------------------------------------------------------------------
  task automatic dataway_idle();
    dec_pins = '1;
  endtask

  // Expected outputs (1 = active) for a command at one phase.
  function automatic logic [7:0] expect_outs(input int f, input int a, input bit n,
                                             input bit s1, input bit s2, input bit z);
    logic [7:0] e;   // {x, rd10, wt22, wt21, wt20, wt11, wt10, init}
    bit known;
    e = '0;
    known = (f == 0 && a == 0) || (f == 16 && a <= 1) || (f == 17 && a <= 2) ||
            (f == 25 && a == 15);
    e[7] = n && known;
    e[6] = n && f == 0 && a == 0;
    e[5] = n && s1 && f == 17 && a == 2;
    e[4] = n && s1 && f == 17 && a == 1;
    e[3] = n && s1 && f == 17 && a == 0;
    e[2] = n && s1 && f == 16 && a == 1;
    e[1] = n && s1 && f == 16 && a == 0;
    e[0] = (z && s2) || (n && s2 && f == 25 && a == 15);
    return e;
  endfunction

  task automatic apply(input int f, input int a, input bit n, input bit s1,
                       input bit s2, input bit z);
    dec_pins.f  = ~5'(f);
    dec_pins.a  = ~4'(a);
    dec_pins.n  = !n;
    dec_pins.b  = 1'b0;          // BUSY for the whole cycle
    dec_pins.s1 = !s1;
    dec_pins.s2 = !s2;
    dec_pins.z  = !z;
  endtask

  task automatic phase_check(input string what, input int f, input int a, input bit n,
                             input bit s1, input bit s2, input bit z);
    logic [7:0] e, got;
    e   = expect_outs(f, a, n, s1, s2, z);
    got = ~dec_outs;
    check($sformatf("%s F%0d A%0d", what, f, a), {24'b0, got}, {24'b0, e});
    if (got[7]) ev[EV_X]++;
    if (got[6]) ev[EV_RD]++;
    if (got[5]) ev[EV_WT22]++;
    if (got[4]) ev[EV_WT21]++;
    if (got[3]) ev[EV_WT20]++;
    if (got[2]) ev[EV_WT11]++;
    if (got[1]) ev[EV_WT10]++;
    if (got[0] && z) ev[EV_INIT_Z]++;
    if (got[0] && !z) ev[EV_INIT_XEQ]++;
  endtask

  // One full dataway cycle: lines, S1, gap, S2, release.
  task automatic camac_cycle(input int f, input int a, input bit n, input bit z,
                             input logic [23:0] data);
    @(negedge clk); wdata = data; apply(f, a, n, 0, 0, z); if (!n && !z) ev[EV_UNADDR]++;
    @(negedge clk); phase_check("before S1", f, a, n, 0, 0, z);
    apply(f, a, n, 1, 0, z);
    @(negedge clk); phase_check("S1", f, a, n, 1, 0, z);
    apply(f, a, n, 0, 0, z);
    @(negedge clk); phase_check("between", f, a, n, 0, 0, z);
    apply(f, a, n, 0, 1, z);
    @(negedge clk); phase_check("S2", f, a, n, 0, 1, z);
    apply(f, a, n, 0, 0, z);
    @(negedge clk); dataway_idle();
  endtask

  // Read cycle: data on the read lines during the cycle, sampled at S1.
  task automatic camac_read(input logic [23:0] exp);
    @(negedge clk); apply(0, 0, 1, 0, 0, 0);
    @(negedge clk); phase_check("read", 0, 0, 1, 0, 0, 0);
    apply(0, 0, 1, 1, 0, 0);
    @(negedge clk); check("read data", {8'b0, rdata}, {8'b0, exp});
    apply(0, 0, 1, 0, 1, 0);
    @(negedge clk); apply(0, 0, 1, 0, 0, 0);
    @(negedge clk); dataway_idle();
    #1;
    check("read lines released", {8'b0, rdata}, 32'b0);
  endtask

  // ------------------------------------------------------------------------
  // Mask register commands: clock at S1, SET and INIT for the whole cycle.
  // ------------------------------------------------------------------------
  logic [3:1] mref;     // model of the mask, 1 = set
  localparam logic [3:1] DM_HIGH = 3'b110;

  typedef enum logic [1:0] {M_SET, M_CLEAR, M_INIT} mcmd_t;

  task automatic mask_cycle(input mcmd_t c, input logic [3:1] bits);
    @(negedge clk);
    mask_w    = bits;
    mask_set  = !(c == M_SET);
    mask_init = !(c == M_INIT);
    @(negedge clk); mask_clk = 1'b1;     // S1
    @(negedge clk); mask_clk = 1'b0;
    case (c)
      M_INIT:  begin mref = '0; ev[EV_M_INIT]++; end
      M_SET:   begin mref = mref | bits; ev[EV_M_SET]++; end
      M_CLEAR: begin mref = mref & ~bits; ev[EV_M_CLEAR]++; end
      default: ;
    endcase
    if (c != M_INIT && bits != 3'b111) ev[EV_M_HOLD]++;
    @(negedge clk);
    mask_w = '0; mask_set = 1'b1; mask_init = 1'b1;
  endtask

  task automatic mask_read_check(input logic [3:1] demands);
    logic [3:1] req;
    mask_dm = demands;
    mask_readm_n = 1'b0;
    @(negedge clk);
    req = mref & ~(demands ^ DM_HIGH);
    check("mask read enable", {31'b0, mask_m_oe}, 32'd1);
    check("mask value", {29'b0, mask_m}, {29'b0, mref});
    check("requests", {29'b0, mask_r}, {29'b0, req});
    check("request enables", {29'b0, mask_r_oe}, 32'd7);
    check("lam", {31'b0, mask_lam}, {31'b0, |req});
    check("lam enable", {31'b0, mask_lam_oe}, 32'd1);
    ev[EV_READ_ON]++;
    if (|req) ev[EV_LAM_ON]++; else ev[EV_LAM_OFF]++;
    mask_readm_n = 1'b1;
    @(negedge clk);
    check("mask read released", {31'b0, mask_m_oe}, 32'd0);
    ev[EV_READ_OFF]++;
  endtask

  localparam string EV_NAME [EV_COUNT] = '{
    "X response", "WT1 A0", "WT1 A1", "WT2 A0", "WT2 A1", "WT2 A2", "RD1 A0",
    "Z.S2 initialise", "XEQ A15 initialise", "unaddressed", "mask initialise",
    "mask bit set", "mask bit clear", "mask bit hold", "LAM on", "LAM off",
    "mask read", "mask read off"};

  initial begin
    for (int k = 0; k < EV_COUNT; k++) ev[k] = 0;
    dataway_idle();
    wdata = '0;
    mask_clk = 1'b0; mask_w = '0; mask_set = 1'b1; mask_init = 1'b1;
    mask_dm = 3'b001; mask_readm_n = 1'b1;
    repeat (2) @(negedge clk);

    // ----- decoder: initialise, write, read back, initialise again -----
    camac_cycle(0, 0, 0, 1, '0);                 // Z.S2
    check("reg10 after Z", {8'b0, reg10}, 32'b0);
    camac_cycle(16, 0, 1, 0, 24'h123456);        // WT1 A0
    camac_cycle(16, 1, 1, 0, 24'h00abcd);        // WT1 A1
    camac_cycle(17, 0, 1, 0, 24'h111111);        // WT2 A0
    camac_cycle(17, 1, 1, 0, 24'h222222);        // WT2 A1
    camac_cycle(17, 2, 1, 0, 24'h333333);        // WT2 A2
    camac_cycle(16, 0, 0, 0, 24'hdeadbe);        // WT1 A0, not addressed
    camac_cycle(17, 3, 1, 0, 24'h444444);        // WT2 A3, not answered
    check("reg10", {8'b0, reg10}, 32'h123456);
    check("reg11", {8'b0, reg11}, 32'h00abcd);
    check("reg20", {8'b0, reg20}, 32'h111111);
    check("reg21", {8'b0, reg21}, 32'h222222);
    check("reg22", {8'b0, reg22}, 32'h333333);
    camac_read(24'h123456);                      // RD1 A0
    camac_cycle(25, 15, 1, 0, '0);               // XEQ A15
    check("reg10 after XEQ", {8'b0, reg10}, 32'b0);
    check("reg22 after XEQ", {8'b0, reg22}, 32'b0);
    camac_read(24'h000000);
    camac_cycle(25, 14, 1, 0, '0);               // XEQ A14: no action

    // ----- mask register -----
    mask_cycle(M_INIT, 3'b000);
    mask_read_check(3'b110);                     // all demands active, mask clear
    mask_cycle(M_SET, 3'b001);
    mask_read_check(3'b110);                     // R1, LAM
    mask_read_check(3'b001);                     // no demand, LAM off
    mask_cycle(M_SET, 3'b100);
    mask_read_check(3'b101);                     // DM1 and DM3 active
    mask_cycle(M_CLEAR, 3'b001);
    mask_read_check(3'b110);
    mask_cycle(M_SET, 3'b010);
    mask_read_check(3'b011);
    mask_cycle(M_CLEAR, 3'b110);
    mask_read_check(3'b110);
    mask_cycle(M_SET, 3'b111);
    mask_read_check(3'b111);
    mask_cycle(M_INIT, 3'b101);
    mask_read_check(3'b110);

    for (int k = 0; k < EV_COUNT; k++) begin
      checks++;
      $display("%-20s %0d", EV_NAME[k], ev[k]);
      if (ev[k] == 0) begin
        failures++;
        $display("FAIL mechanism never happened: %s", EV_NAME[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
