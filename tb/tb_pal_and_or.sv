// tb_pal_and_or: self-checking test of the programmable AND-OR array.
//
// Three arrays are checked exhaustively over all their input values:
//  - the unprogrammed two-input, two-gate array (every fuse intact): the
//    output and both products must always be 0;
//  - the same array programmed as an exclusive OR, I1*/I2 + /I1*I2;
//  - a six-input, three-output, three-term array with inverted outputs and
//    a fixed pseudo-random fuse map that includes an all-blown term (always
//    true) and an all-intact term (always false).
// Expected values come from a per-fuse reference written in the testbench:
// a product is false as soon as one intact fuse sees a low column.
module tb_pal_and_or;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  // Watchdog: the test needs far fewer than 2000 cycles.
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("tb_pal_and_or: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- unprogrammed array ---------------------------------------------------
  logic [1:0] in0;
  logic [1:0] prod0;
  logic [0:0] out0;
  pal_and_or u_blank (.in(in0), .product(prod0), .out(out0));

  // ---- exclusive OR: term 0 = I1*/I2, term 1 = /I1*I2 (bit 0 = I1) ----------
  logic [1:0] in1;
  logic [1:0] prod1;
  logic [0:0] out1;
  pal_and_or #(
    .N_IN(2), .N_OUT(1), .TERMS(2), .ACTIVE_LOW(1'b0),
    .FUSE_TRUE({2'b10, 2'b01}), .FUSE_COMP({2'b01, 2'b10})
  ) u_xor (.in(in1), .product(prod1), .out(out1));

  // ---- larger array -------------------------------------------------------
  localparam int NI = 6, NO = 3, NT = 3;
  localparam logic [NO*NT*NI-1:0] FT = {
    6'b000000, 6'b100001, 6'b010010,   // output 2: t2 all blown (true)
    6'b111111, 6'b001000, 6'b000101,   // output 1: t2 all intact (false)
    6'b000011, 6'b110000, 6'b001100    // output 0
  };
  localparam logic [NO*NT*NI-1:0] FC = {
    6'b000000, 6'b000110, 6'b001000,
    6'b111111, 6'b010001, 6'b100000,
    6'b010000, 6'b000001, 6'b100010
  };
  logic [NI-1:0]    in2;
  logic [NO*NT-1:0] prod2;
  logic [NO-1:0]    out2;
  pal_and_or #(
    .N_IN(NI), .N_OUT(NO), .TERMS(NT), .ACTIVE_LOW(1'b1),
    .FUSE_TRUE(FT), .FUSE_COMP(FC)
  ) u_big (.in(in2), .product(prod2), .out(out2));

  // Reference: walk the fuses one at a time.
  function automatic logic ref_product(input logic [NI-1:0] v,
                                       input logic [NI-1:0] t,
                                       input logic [NI-1:0] c);
    logic p;
    p = 1'b1;
    for (int i = 0; i < NI; i++) begin
      if (t[i] && !v[i]) p = 1'b0;
      if (c[i] &&  v[i]) p = 1'b0;
    end
    return p;
  endfunction

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 4; v++) begin
      in0 = 2'(v);
      in1 = 2'(v);
      @(posedge clk);
      check($sformatf("blank out in=%0d", v), out0[0], 1'b0);
      check($sformatf("blank products in=%0d", v), |prod0, 1'b0);
      check($sformatf("xor out in=%0d", v), out1[0], in1[0] ^ in1[1]);
      check($sformatf("xor term0 in=%0d", v), prod1[0], in1[0] & ~in1[1]);
      check($sformatf("xor term1 in=%0d", v), prod1[1], ~in1[0] & in1[1]);
    end
    for (int v = 0; v < (1 << NI); v++) begin
      logic [NO-1:0] exp_out;
      in2 = NI'(v);
      @(posedge clk);
      exp_out = '0;
      for (int p = 0; p < NO*NT; p++) begin
        logic e;
        e = ref_product(in2, FT[p*NI +: NI], FC[p*NI +: NI]);
        check($sformatf("big product %0d in=%0d", p, v), prod2[p], e);
        if (e) exp_out[p / NT] = 1'b1;
      end
      for (int o = 0; o < NO; o++)
        check($sformatf("big out %0d in=%0d", o, v), out2[o], ~exp_out[o]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
