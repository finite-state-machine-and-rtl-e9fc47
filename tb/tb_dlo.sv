// tb_dlo: end-to-end test of the digital lac operon at its default
// parameters.
//
// The whole design runs as published: one Lac transition per clock, the
// random bits from the on-chip LFSR. The test bench drives R and C and
// keeps its own model of both parts: a 16-bit LFSR written with explicit
// taps (stepped five times per clock) and the row-by-row truth table of
// lac_ref_pkg. Every clock it compares rnd, state, mem and out with the
// model, so a transition that is late, early or wrong is caught.
//
// Conditions come in phases: fully random R and C (the published
// experiment), then each fixed {R,C} environment in turn, then random
// again, with a reset in between. The test counts how often each mechanism
// of the machine occurs: every state reached, each transcription output
// (01, 10, 11), a repressor binding deferred into mem, a fresh binding
// recorded at the first and at the third site, a deferral cancelled, the
// fef state entered and a reset. Each must happen at least once.
module tb_dlo;
  import lac_pkg::*;
  import lac_ref_pkg::*;

  localparam int unsigned PHASE   = 20000;
  localparam int unsigned NPHASES = 6;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       r_in = 1'b0, c_in = 1'b0;
  lac_state_e state;
  mem_t       mem;
  lac_out_t   out;
  lac_rand_t  rnd;

  dlo dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  int unsigned state_hits[32];
  int unsigned out_hits[4];
  int unsigned n_defer = 0, n_first = 0, n_third = 0, n_cancel = 0;
  int unsigned n_fef = 0, n_reset = 0, n_trans = 0;

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 20)
        $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic need(string what, int unsigned n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  function automatic logic [15:0] lfsr_step(logic [15:0] s);
    return {s[14:0], s[15] ^ s[14] ^ s[12] ^ s[3]};
  endfunction

  initial begin : watchdog
    repeat (PHASE * NPHASES + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [15:0] m_q;
    logic [4:0]  m_st, ex_st;
    logic [2:0]  m_m, ex_m;
    logic [1:0]  ex_o;
    int          row;

    init();
    repeat (2) @(posedge clk);
    for (int unsigned ph = 0; ph < NPHASES; ph++) begin
      // reset at the start of every phase
      rst = 1'b1;
      @(negedge clk);
      rst = 1'b0;
      n_reset++;
      m_q = 16'hACE1; m_st = 5'b00000; m_m = 3'b000;
      check("reset state", 16'(state), 16'(m_st));
      check("reset mem", 16'(mem), 16'(m_m));
      check("reset out", 16'(out), 16'd0);
      check("reset rnd", 16'(rnd), 16'(m_q[4:0]));

      for (int unsigned n = 0; n < PHASE; n++) begin
        unique case (ph)
          1: {r_in, c_in} = 2'b00;
          2: {r_in, c_in} = 2'b01;
          3: {r_in, c_in} = 2'b10;
          4: {r_in, c_in} = 2'b11;
          default: {r_in, c_in} = 2'($urandom);
        endcase
        // the random bits the DUT uses now must be the model's
        check("rnd", 16'(rnd), 16'(m_q[4:0]));
        row = step(m_st, m_m, r_in, c_in, m_q[4:3], m_q[2:1], m_q[0],
                   ex_st, ex_m, ex_o);
        if (row < 0) begin
          failures++;
          $display("FAIL no table row for %s mem=%b", name_of(m_st), m_m);
        end
        if (m_m != 3'b100 && ex_m == 3'b100) n_defer++;
        if (m_m != 3'b101 && ex_m == 3'b101) n_first++;
        if (m_m != 3'b110 && ex_m == 3'b110) n_third++;
        if (m_m == 3'b100 && ex_m == 3'b000 && ex_st == m_st) n_cancel++;
        if (m_st != 5'b00101 && ex_st == 5'b00101) n_fef++;

        @(posedge clk);
        @(negedge clk);
        n_trans++;
        check("state", 16'(state), 16'(ex_st));
        check("mem", 16'(mem), 16'(ex_m));
        check("out", 16'(out), 16'(ex_o));
        state_hits[state]++;
        out_hits[out]++;
        repeat (5) m_q = lfsr_step(m_q);
        m_st = ex_st;
        m_m  = ex_m;
      end
    end

    $display("mechanism counts over %0d transitions:", n_trans);
    for (int s = 0; s < 32; s++)
      if (name_of(5'(s)) != "???") need({"state ", name_of(5'(s))}, state_hits[s]);
    need("out 01 (basal transcription)", out_hits[1]);
    need("out 10 (CAP, one site)", out_hits[2]);
    need("out 11 (CAP, both sites)", out_hits[3]);
    need("binding deferred (mem 100)", n_defer);
    need("fresh binding, first (101)", n_first);
    need("fresh binding, third (110)", n_third);
    need("deferral cancelled", n_cancel);
    need("fef entered", n_fef);
    need("reset", n_reset);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
