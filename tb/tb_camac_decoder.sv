// tb_camac_decoder: self-checking test of the PAL14L8 CAMAC decoder.
//
// Every one of the 2^14 input pin combinations is applied, and each of the
// eight active-low outputs is compared with a reference written from the
// CAMAC meaning of the commands (function code, sub-address, N, BUSY, S1,
// S2, Z), not from the product terms. Pins are active low, so the reference
// first turns pin levels into dataway values. The test also counts how
// often each output was asserted and fails if one never was.
module tb_camac_decoder;
  import camac_pal_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("tb_camac_decoder: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  dec_in_t  pins;
  dec_out_t outs;

  camac_decoder dut (.pins(pins), .outs(outs));

  // Reference decode from dataway values.
  function automatic dec_out_t ref_decode(input dec_in_t p);
    int f, a;
    logic cmd, s1, s2, z;
    dec_out_t o;
    logic [4:0] fbits;
    logic [3:0] abits;
    fbits = ~p.f;
    abits = ~p.a;
    f   = int'(fbits);          // function code F0..F31
    a   = int'(abits);          // sub-address A0..A15
    cmd = !p.n && !p.b;         // module addressed during a dataway cycle
    s1  = !p.s1;
    s2  = !p.s2;
    z   = !p.z;
    o.wt10 = !(cmd && f == 16 && a == 0 && s1);
    o.wt11 = !(cmd && f == 16 && a == 1 && s1);
    o.wt20 = !(cmd && f == 17 && a == 0 && s1);
    o.wt21 = !(cmd && f == 17 && a == 1 && s1);
    o.wt22 = !(cmd && f == 17 && a == 2 && s1);
    o.rd10 = !(cmd && f == 0 && a == 0);
    o.x    = !(cmd && ((f == 0 && a == 0) || (f == 16 && a <= 1) ||
                       (f == 17 && a <= 2) || (f == 25 && a == 15)));
    o.init = !((z && s2) || (cmd && f == 25 && a == 15 && s2));
    return o;
  endfunction

  int hits[8];

  task automatic check_all(input string what);
    dec_out_t e;
    e = ref_decode(pins);
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (outs[k] !== e[k]) begin
        failures++;
        if (failures < 20)
          $display("FAIL %s output bit %0d: pins=%b got %b expected %b",
                   what, k, pins, outs, e);
      end
      if (!outs[k]) hits[k]++;
    end
  endtask

  // Builds pin levels from dataway values (1 = line active).
  function automatic dec_in_t drive(input int f, input int a, input bit n,
                                    input bit b, input bit s1, input bit s2,
                                    input bit z);
    dec_in_t p;
    p.f  = ~5'(f);
    p.a  = ~4'(a);
    p.n  = !n;
    p.b  = !b;
    p.s1 = !s1;
    p.s2 = !s2;
    p.z  = !z;
    return p;
  endfunction

  initial begin
    // A few directed cycles first: Z.S2, unaddressed, each command at S1.
    pins = drive(0, 0, 0, 1, 0, 1, 1);   @(posedge clk); check_all("Z.S2");
    pins = drive(16, 0, 0, 1, 1, 0, 0);  @(posedge clk); check_all("no N");
    pins = drive(16, 0, 1, 0, 1, 0, 0);  @(posedge clk); check_all("no B");
    pins = drive(0, 0, 1, 1, 0, 0, 0);   @(posedge clk); check_all("RD1 A0");
    pins = drive(16, 0, 1, 1, 1, 0, 0);  @(posedge clk); check_all("WT1 A0 S1");
    pins = drive(16, 1, 1, 1, 1, 0, 0);  @(posedge clk); check_all("WT1 A1 S1");
    pins = drive(17, 2, 1, 1, 1, 0, 0);  @(posedge clk); check_all("WT2 A2 S1");
    pins = drive(25, 15, 1, 1, 0, 1, 0); @(posedge clk); check_all("XEQ A15 S2");
    pins = drive(24, 15, 1, 1, 0, 1, 0); @(posedge clk); check_all("F24 A15 S2");
    // Then every combination of the 14 input pins.
    for (int v = 0; v < (1 << DEC_N_IN); v++) begin
      pins = dec_in_t'(v);
      @(posedge clk);
      check_all("exhaustive");
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (hits[k] == 0) begin
        failures++;
        $display("FAIL output bit %0d never asserted", k);
      end
    end
    $display("outputs asserted (init, wt10, wt11, wt20, wt21, wt22, rd10, x): %0d %0d %0d %0d %0d %0d %0d %0d",
             hits[0], hits[1], hits[2], hits[3], hits[4], hits[5], hits[6], hits[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
