// tb_lfsr: self-checking test of the LFSR.
//
// A bit-serial model of the same polynomial (new bit = parity of the tapped
// bits, shifted in at the bottom) is stepped STEPS times per enabled clock
// and compared with q every cycle. Holding en low must freeze q, and reset
// must reload SEED. Two instances are checked: the default 16-bit register
// over its full period (2^16 - 1 single steps; 5 divides 65535, so at 5
// steps per clock it returns to SEED after 65535 / 5 = 13107 clocks) and a
// 5-bit register, whose maximal period of 31 is checked directly.
module tb_lfsr;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en  = 1'b0;

  always #5 clk = ~clk;

  // default instance: 16 bits, 5 steps per clock
  logic [15:0] q16;
  lfsr dut16 (.clk(clk), .rst(rst), .en(en), .q(q16));

  // small instance: x^5 + x^3 + 1, one step per clock
  logic [4:0] q5;
  lfsr #(.WIDTH(5), .TAPS(5'b10100), .SEED(5'b00001), .STEPS(1))
    dut5 (.clk(clk), .rst(rst), .en(en), .q(q5));

  int unsigned checks = 0, failures = 0;

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // reference: one step of a Fibonacci LFSR written with explicit taps
  function automatic logic [15:0] ref16(logic [15:0] s);
    logic fb = s[15] ^ s[14] ^ s[12] ^ s[3];  // x^16 + x^15 + x^13 + x^4 + 1
    return {s[14:0], fb};
  endfunction
  function automatic logic [4:0] ref5(logic [4:0] s);
    logic fb = s[4] ^ s[2];                    // x^5 + x^3 + 1
    return {s[3:0], fb};
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [15:0] m16;
    logic [4:0]  m5;
    int unsigned period16, period5;
    bit          seen_zero;

    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    check("seed16", q16, 16'hACE1);
    check("seed5", 16'(q5), 16'h0001);

    // en low: no change
    repeat (3) @(negedge clk);
    check("hold16", q16, 16'hACE1);
    check("hold5", 16'(q5), 16'h0001);

    // run the full period of both, comparing every clock
    m16 = 16'hACE1; m5 = 5'b00001;
    period16 = 0; period5 = 0; seen_zero = 0;
    en = 1'b1;
    for (int unsigned n = 1; n <= 13107; n++) begin
      @(negedge clk);
      repeat (5) m16 = ref16(m16);
      m5 = ref5(m5);
      check("q16", q16, m16);
      check("q5", 16'(q5), 16'(m5));
      if (q16 == 16'h0000 || q5 == 5'b0) seen_zero = 1;
      if (period16 == 0 && q16 == 16'hACE1) period16 = n;
      if (period5 == 0 && q5 == 5'b00001) period5 = n;
    end
    check("period16", 16'(period16), 16'd13107);
    check("period5", 16'(period5), 16'd31);
    check("never zero", 16'(seen_zero), 16'd0);

    // reset reloads the seed
    @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    check("reseed16", q16, 16'hACE1);
    check("reseed5", 16'(q5), 16'h0001);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
