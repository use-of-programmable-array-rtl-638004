// tb_camac_mask_register: self-checking test of the PAL16R4 LAM mask and
// request register.
//
// A reference model in the testbench keeps the mask as three bits (1 = set)
// and applies the rules at each rising clock edge: INIT low clears all bits;
// otherwise a bit with its write line high becomes set when SET is low and
// cleared when SET is high, and a bit with its write line low holds. The
// requests are mask AND active demand (DM1 active low, DM2 and DM3 active
// high at the pins, the device's default), LAM is their OR, and the mask
// pins are driven only while /READM is low. A second copy, built with the
// opposite demand polarity, is checked alongside.
//
// A directed sequence (initialise, set each bit, hold, demands, clear each
// bit, three-state read) is followed by random stimulus. Inputs change half
// a cycle away from the clock edge; outputs are checked before each edge.
module tb_camac_mask_register;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("tb_camac_mask_register: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:1] w, dm, m, r, r_oe;
  logic       set, init, readm_n, m_oe, lam, lam_oe;

  camac_mask_register dut (
    .clkmask(clk), .w(w), .set(set), .init(init), .dm(dm), .readm_n(readm_n),
    .m(m), .m_oe(m_oe), .r(r), .r_oe(r_oe), .lam(lam), .lam_oe(lam_oe)
  );

  localparam logic [3:1] DM_HIGH = 3'b110;   // DM1 active low, DM2/DM3 high

  // A second copy built with the opposite demand polarity (DM1 active high,
  // DM2 and DM3 active low); only its requests and LAM differ.
  localparam logic [3:1] DM_HIGH_ALT = 3'b001;
  logic [3:1] m_alt, r_alt, r_oe_alt;
  logic       m_oe_alt, lam_alt, lam_oe_alt;
  camac_mask_register #(.DM_ACTIVE_HIGH(DM_HIGH_ALT)) dut_alt (
    .clkmask(clk), .w(w), .set(set), .init(init), .dm(dm), .readm_n(readm_n),
    .m(m_alt), .m_oe(m_oe_alt), .r(r_alt), .r_oe(r_oe_alt), .lam(lam_alt),
    .lam_oe(lam_oe_alt)
  );
  logic [3:1] mref;
  logic       mref_valid = 1'b0;
  int n_init = 0, n_set = 0, n_clear = 0, n_hold = 0, n_lam = 0, n_tristate = 0;

  task automatic check(input string what, input logic [3:0] got, input logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s at %0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  // Check the outputs against the model, just before a clock edge.
  task automatic check_outputs();
    logic [3:1] act, rexp;
    act  = ~(dm ^ DM_HIGH);           // demand active
    check("m_oe", {3'b0, m_oe}, {3'b0, !readm_n});
    check("r_oe", {1'b0, r_oe}, 4'b0111);
    check("lam_oe", {3'b0, lam_oe}, 4'b0001);
    if (readm_n) n_tristate++;
    if (mref_valid) begin
      rexp = mref & act;
      check("m", {1'b0, m}, {1'b0, mref});
      check("r", {1'b0, r}, {1'b0, rexp});
      check("lam", {3'b0, lam}, {3'b0, |rexp});
      if (|rexp) n_lam++;
      rexp = mref & ~(dm ^ DM_HIGH_ALT);
      check("m alt", {1'b0, m_alt}, {1'b0, mref});
      check("r alt", {1'b0, r_alt}, {1'b0, rexp});
      check("lam alt", {3'b0, lam_alt}, {3'b0, |rexp});
    end
  endtask

  // Model update at the clock edge, from the values present at the edge.
  always @(posedge clk) begin
    if (!init) begin
      mref       <= 3'b000;
      mref_valid <= 1'b1;
      n_init++;
    end else begin
      for (int i = 1; i <= 3; i++) begin
        if (w[i]) begin
          mref[i] <= !set;
          if (!set) n_set++; else n_clear++;
        end else begin
          n_hold++;
        end
      end
    end
  end

  task automatic cycle(input logic i_n, input logic s, input logic [3:1] wr,
                       input logic [3:1] d, input logic rd_n);
    @(negedge clk);
    init = i_n; set = s; w = wr; dm = d; readm_n = rd_n;
    #4;
    check_outputs();
  endtask

  initial begin
    init = 1'b1; set = 1'b1; w = '0; dm = 3'b001; readm_n = 1'b0;
    //      INIT  SET   W       DM      /READM
    cycle(1'b0, 1'b1, 3'b000, 3'b001, 1'b0);   // initialise
    cycle(1'b1, 1'b0, 3'b000, 3'b110, 1'b0);   // set, no write: all demands active, no request
    cycle(1'b1, 1'b0, 3'b001, 3'b110, 1'b0);   // set M1
    cycle(1'b1, 1'b0, 3'b000, 3'b110, 1'b0);   // M1 set, R1 and LAM
    cycle(1'b1, 1'b1, 3'b000, 3'b001, 1'b0);   // hold, demands idle
    cycle(1'b1, 1'b1, 3'b001, 3'b110, 1'b1);   // clear M1, mask not driven
    cycle(1'b1, 1'b0, 3'b010, 3'b110, 1'b0);   // set M2
    cycle(1'b1, 1'b0, 3'b100, 3'b110, 1'b0);   // set M3, M2 holds
    cycle(1'b1, 1'b1, 3'b010, 3'b100, 1'b0);   // clear M2, DM3 only
    cycle(1'b1, 1'b1, 3'b100, 3'b000, 1'b0);   // clear M3
    cycle(1'b1, 1'b0, 3'b111, 3'b000, 1'b0);   // set all
    cycle(1'b0, 1'b0, 3'b111, 3'b110, 1'b0);   // initialise beats set
    cycle(1'b1, 1'b1, 3'b000, 3'b110, 1'b0);
    for (int k = 0; k < 3000; k++)
      cycle($urandom_range(0, 15) != 0, 1'($urandom), 3'($urandom),
            3'($urandom), 1'($urandom));
    if (n_init == 0 || n_set == 0 || n_clear == 0 || n_hold == 0 || n_lam == 0 || n_tristate == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    checks++;
    $display("init %0d set %0d clear %0d hold %0d lam %0d tristate %0d",
             n_init, n_set, n_clear, n_hold, n_lam, n_tristate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
