// tb_lac_fsm: self-checking test of the Lac FSM against the row-by-row
// reference model in lac_ref_pkg.
//
// A shadow copy of state and mem is stepped by the reference model in lock
// step with the DUT. Inputs R, C, f, loc, sel are random and change on the
// falling edge; after every rising edge state, mem and out are compared.
// Resets are inserted at random and must return eee / 000 / 00. Every
// transition takes exactly one clock, which the lock-step comparison
// checks. At the end every row of the table must have been exercised and
// every one of the 19 states visited.
module tb_lac_fsm;
  import lac_pkg::*;
  import lac_ref_pkg::*;

  localparam int unsigned NCYC     = 300000;
  localparam int unsigned WATCHDOG = NCYC + 1000;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       r_in = 1'b0, c_in = 1'b0, sel = 1'b0;
  logic [1:0] f = '0, loc = '0;
  lac_state_e state;
  mem_t       mem;
  lac_out_t   out;

  lac_fsm dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  int unsigned row_hits[$];
  int unsigned state_hits[32];
  int unsigned unmatched = 0, resets = 0;

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 20)
        $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [4:0] sh_st, ex_st;
    logic [2:0] sh_m, ex_m;
    logic [1:0] ex_o;
    int         row;

    init();
    row_hits = {};
    foreach (rows[i]) row_hits.push_back(0);

    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    sh_st = 5'b00000;
    sh_m  = 3'b000;
    check("reset state", 8'(state), 8'(sh_st));
    check("reset mem", 8'(mem), 8'(sh_m));
    check("reset out", 8'(out), 8'b0);

    for (int unsigned n = 0; n < NCYC; n++) begin
      // new random inputs, applied away from the active edge
      r_in = 1'($urandom);
      c_in = 1'($urandom);
      f    = 2'($urandom);
      loc  = 2'($urandom);
      sel  = 1'($urandom);
      rst  = ($urandom % 3000) == 0;

      if (rst) begin
        ex_st = 5'b00000; ex_m = 3'b000; ex_o = 2'b00;
        resets++;
      end
      else begin
        row = step(sh_st, sh_m, r_in, c_in, f, loc, sel, ex_st, ex_m, ex_o);
        if (row >= 0) row_hits[row]++;
        else          unmatched++;
      end

      @(posedge clk);
      @(negedge clk);
      check("state", 8'(state), 8'(ex_st));
      check("mem", 8'(mem), 8'(ex_m));
      check("out", 8'(out), 8'(ex_o));
      if (state != ex_st && failures <= 20)
        $display("     from %s mem=%b R=%b C=%b f=%b loc=%b sel=%b -> dut %s, model %s",
                 name_of(sh_st), sh_m, r_in, c_in, f, loc, sel,
                 name_of(state), name_of(ex_st));
      // continue from the DUT's state so one error is reported once
      sh_st = state;
      sh_m  = mem;
      state_hits[sh_st]++;
    end

    // coverage: every table row and every state must have been exercised
    foreach (row_hits[i]) begin
      checks++;
      if (row_hits[i] == 0) begin
        failures++;
        $display("FAIL row %0d (%s mem=%s RC=%s f=%s loc=%s sel=%s) never exercised",
                 i, rows[i].st, rows[i].m, rows[i].rc, rows[i].f, rows[i].loc, rows[i].sel);
      end
    end
    for (int s = 0; s < 32; s++) begin
      if (name_of(5'(s)) != "???") begin
        checks++;
        if (state_hits[s] == 0) begin
          failures++;
          $display("FAIL state %s never visited", name_of(5'(s)));
        end
      end
    end
    checks++;
    if (resets == 0) begin
      failures++;
      $display("FAIL no reset exercised");
    end
    $display("resets=%0d unlisted-combinations=%0d", resets, unmatched);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
