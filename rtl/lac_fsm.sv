// lac_fsm: the Lac module, a 19-state machine that models the binding and
// release of lac repressor, CAP and RNA polymerase on the lac operon's
// control region.
//
// How it works. The state names the occupant of three sites (see lac_pkg):
// a repressor or CAP at either outer site, the polymerase at the middle one.
// Each clock the machine makes one transition chosen by
//   r_in, c_in  - the environment: {R,C} = 00, 01, 10 or 11
//   f, loc, sel - five random bits from the LFSR, which pick among the
//                 possible outcomes (which site a molecule goes to, whether
//                 it binds now or is deferred, whether a protein leaves)
//   mem         - a 3-bit register remembering a deferred or fresh
//                 repressor binding (000, 100, 101, 110; see lac_pkg)
// The polymerase leaving the promoter produces a nonzero out code that
// grades the transcription level. The next-state function follows the
// published 19-state truth table row by row; rows are tried in table order
// and the first match wins.
//
// Choices of this design where the table is silent or unclear:
//  * an input combination the table does not list keeps state and mem and
//    gives out = 00;
//  * the 13 unused state codes return to eee with mem cleared;
//  * reset is synchronous and active high, and does what the table's first
//    row does (eee, mem 000, out 00);
//  * out is registered: it holds the code of the transition just made, and
//    is valid one cycle after the inputs that caused it;
//  * where the table prints two rows with identical conditions but
//    different results, the rows are told apart by loc[0] (outer site
//    choice) as in the neighbouring states that print that bit;
//  * the release rows of ree and cpr use mem 101 and 110 respectively, the
//    values the machine actually stores in those states, as in all other
//    states of the table;
//  * where a row's result is not given (rpc and cpe with nothing pending
//    and {R,C} = 00) or a row is absent (cer with mem 100, {R,C} = 00,
//    sel = 1), the row follows the matching state one step along (rec,
//    cee and cpr respectively).
//
// Interface: clk, rst, r_in, c_in, f[1:0], loc[1:0], sel in; state[4:0],
// mem[2:0], out[1:0] out, all registered. One transition per clock.
module lac_fsm
  import lac_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       r_in,
  input  logic       c_in,
  input  logic [1:0] f,
  input  logic [1:0] loc,
  input  logic       sel,
  output lac_state_e state,
  output mem_t       mem,
  output lac_out_t   out
);

  lac_step_t nx;  // next state, mem and out

  logic [1:0] rc;
  assign rc = {r_in, c_in};

  always_comb begin
    nx.state = state;
    nx.mem   = mem;
    nx.out   = OUT_NONE;

    unique case (state)
      // ---------------------------------------------------------------- l0
      S_EEE: begin
        unique case (rc)
          2'b00: if (!mem[2]) nx.state = S_EPE;
                 else         nx.mem   = MEM_CLR;
          2'b01: nx.state = loc[0] ? S_EEC : S_CEE;
          2'b10: begin
            if (mem[2])                nx.state = loc[0] ? S_EER : S_REE;
            else if (f == 2'b00) begin
              if (loc == 2'b00)        nx.state = S_REE;
              else if (loc == 2'b01)   nx.state = S_EER;
              else                     nx.mem   = MEM_WAIT;
            end
            else if (f == 2'b01)  begin nx.state = S_REE; nx.mem = MEM_FIRST; end
            else if (f == 2'b10)  begin nx.state = S_EER; nx.mem = MEM_THIRD; end
            else                       nx.state = S_FEF;
          end
          2'b11: nx.state = S_EPE;
        endcase
      end
      // ---------------------------------------------------------------- l1
      S_EER: begin
        unique case (rc)
          2'b00: nx = release_one(nx, mem, loc[0], S_EEE, MEM_THIRD);
          2'b01: nx.state = S_CER;
          2'b10: nx = bind_outer(nx, mem[2], f[0], loc[0], S_RER, MEM_FIRST);
          2'b11: nx.state = S_EPR;
        endcase
      end
      // ---------------------------------------------------------------- l2
      S_EEC: begin
        unique case (rc)
          2'b00: begin
            if (!mem[2] || sel)        nx.state = S_EEE;
            else                       nx.mem   = MEM_CLR;
          end
          2'b01: nx.state = S_CEC;
          2'b10: nx = bind_outer(nx, mem[2], f[0], loc[0], S_REC, MEM_FIRST);
          2'b11: nx.state = S_EPC;
        endcase
      end
      // ---------------------------------------------------------------- l3
      S_EPE: begin
        unique case (rc)
          2'b00: begin
            if (!mem[2])          begin nx.state = S_EEE; nx.out = OUT_BASAL; end
            else                       nx.mem   = MEM_CLR;
          end
          2'b01: nx.state = loc[0] ? S_EPC : S_CPE;
          2'b10: begin
            if (mem[2])                nx.state = loc[0] ? S_EPR : S_RPE;
            else if (f == 2'b00) begin
              if (loc == 2'b00)        nx.state = S_RPE;
              else if (loc == 2'b01)   nx.state = S_EPR;
              else                     nx.mem   = MEM_WAIT;
            end
            else if (f == 2'b01)  begin nx.state = S_RPE; nx.mem = MEM_FIRST; end
            else if (f == 2'b10)  begin nx.state = S_EPR; nx.mem = MEM_THIRD; end
            else                       nx.state = loc[0] ? S_EPR : S_RPE;
          end
          2'b11: begin nx.state = S_EEE; nx.out = OUT_BASAL; end
        endcase
      end
      // ---------------------------------------------------------------- l4
      S_EPR: begin
        unique case (rc)
          2'b00: nx = release_one(nx, mem, loc[0], S_EPE, MEM_THIRD);
          2'b01: nx.state = S_CPR;
          2'b10: nx = bind_outer(nx, mem[2], f[0], loc[0], S_RPR, MEM_FIRST);
          2'b11: nx.state = S_EER;
        endcase
      end
      // ---------------------------------------------------------------- l5
      S_EPC: begin
        unique case (rc)
          2'b00: begin
            if (!mem[2] || sel)        nx.state = S_EPE;
            else                       nx.mem   = MEM_CLR;
          end
          2'b01: nx.state = S_CPC;
          2'b10: nx = bind_outer(nx, mem[2], f[0], loc[0], S_RPC, MEM_FIRST);
          2'b11: begin nx.state = S_EEC; nx.out = OUT_CAP1; end
        endcase
      end
      // ---------------------------------------------------------------- l6
      S_REE: begin
        unique case (rc)
          2'b00: nx = release_one(nx, mem, loc[0], S_EEE, MEM_FIRST);
          2'b01: nx.state = S_REC;
          2'b10: nx = bind_outer(nx, mem[2], f[0], loc[0], S_RER, MEM_THIRD);
          2'b11: nx.state = S_RPE;
        endcase
      end
      // ---------------------------------------------------------------- l7
      S_RER: begin
        if (!r_in) nx = release_two(nx, mem, loc, S_EER, S_REE);
        else if (!mem[2]) nx.mem   = MEM_WAIT;
        else              nx.state = S_RPR;
      end
      // ---------------------------------------------------------------- l8
      S_REC: begin
        unique case (rc)
          2'b00: if (sel)  nx.state = S_REE;
                 else      nx = release_one(nx, mem, loc[0], S_EEC, MEM_FIRST);
          2'b01: nx.state = S_RPC;
          2'b10: nx = defer_or(nx, mem[2], S_RPC, OUT_NONE);
          2'b11: nx.state = S_RPC;
        endcase
      end
      // ---------------------------------------------------------------- l9
      S_RPE: begin
        unique case (rc)
          2'b00: nx = release_one(nx, mem, loc[0], S_EPE, MEM_FIRST);
          2'b01: nx.state = S_RPC;
          2'b10: nx = bind_outer(nx, mem[2], f[0], loc[0], S_RPR, MEM_THIRD);
          2'b11: begin nx.state = S_REE; nx.out = OUT_BASAL; end
        endcase
      end
      // --------------------------------------------------------------- l10
      S_RPR: begin
        if (!r_in) nx = release_two(nx, mem, loc, S_EPR, S_RPE);
        else if (!mem[2]) nx.mem   = MEM_WAIT;
        else              nx.state = S_RER;
      end
      // --------------------------------------------------------------- l11
      S_RPC: begin
        unique case (rc)
          2'b00: if (sel)  nx.state = S_RPE;
                 else      nx = release_one(nx, mem, loc[0], S_EPC, MEM_FIRST);
          2'b01: begin nx.state = S_REC; nx.out = OUT_CAP1; end
          2'b10: nx = defer_or(nx, mem[2], S_REC, OUT_CAP1);
          2'b11: begin nx.state = S_REC; nx.out = OUT_CAP1; end
        endcase
      end
      // --------------------------------------------------------------- l12
      S_CEE: begin
        unique case (rc)
          2'b00: begin
            if (!mem[2] || sel)        nx.state = S_EEE;
            else                       nx.mem   = MEM_CLR;
          end
          2'b01: nx.state = S_CEC;
          2'b10: nx = bind_outer(nx, mem[2], f[0], loc[0], S_CER, MEM_THIRD);
          2'b11: nx.state = S_CPE;
        endcase
      end
      // --------------------------------------------------------------- l13
      S_CER: begin
        unique case (rc)
          2'b00: begin
            if (!sel) begin
              if (!mem[2])                  nx.state = S_CEE;
              else if (mem == MEM_WAIT) begin
                if (!loc[0])          begin nx.state = S_CEE; nx.mem = MEM_CLR; end
                else                        nx.mem   = MEM_CLR;
              end
              else if (mem == MEM_THIRD) begin nx.state = S_CEE; nx.mem = MEM_CLR; end
            end
            else if (!mem[2] || mem == MEM_WAIT || mem == MEM_THIRD) nx.state = S_EER;
          end
          2'b01: nx.state = S_CPR;
          2'b10: nx = defer_or(nx, mem[2], S_CPR, OUT_NONE);
          2'b11: nx.state = S_CPR;
        endcase
      end
      // --------------------------------------------------------------- l14
      S_CEC: begin
        unique case (rc)
          2'b00: begin
            if (mem[2] && !sel)        nx.mem   = MEM_CLR;
            else                       nx.state = loc[0] ? S_CEE : S_EEC;
          end
          2'b01: nx.state = S_CPC;
          2'b10: nx = defer_or(nx, mem[2], S_CPC, OUT_NONE);
          2'b11: nx.state = S_CPC;
        endcase
      end
      // --------------------------------------------------------------- l15
      S_CPE: begin
        unique case (rc)
          2'b00: begin
            if (!mem[2] || sel)        nx.state = S_EPE;
            else                       nx.mem   = MEM_CLR;
          end
          2'b01: nx.state = S_CPC;
          2'b10: nx = bind_outer(nx, mem[2], f[0], loc[0], S_CPR, MEM_THIRD);
          2'b11: begin nx.state = S_CEE; nx.out = OUT_CAP1; end
        endcase
      end
      // --------------------------------------------------------------- l16
      S_CPR: begin
        unique case (rc)
          2'b00: begin
            if (sel) begin
              if (!mem[2] || mem == MEM_WAIT || mem == MEM_THIRD) nx.state = S_EPR;
            end
            else nx = release_one(nx, mem, loc[0], S_CPE, MEM_THIRD);
          end
          2'b01: nx.state = S_CER;
          2'b10: nx = defer_or(nx, mem[2], S_CER, OUT_NONE);
          2'b11: nx.state = S_CER;
        endcase
      end
      // --------------------------------------------------------------- l17
      S_CPC: begin
        unique case (rc)
          2'b00: begin
            if (mem[2] && !sel)        nx.mem   = MEM_CLR;
            else                       nx.state = loc[0] ? S_CPE : S_EPC;
          end
          2'b01: begin nx.state = S_CEC; nx.out = OUT_CAP2; end
          2'b10: nx = defer_or(nx, mem[2], S_CEC, OUT_CAP2);
          2'b11: begin nx.state = S_CEC; nx.out = OUT_CAP2; end
        endcase
      end
      // --------------------------------------------------------------- l18
      S_FEF: begin
        if (!r_in) begin
          if (!mem[2] || !loc[0])      nx.state = S_EEE;
          else                         nx.mem   = MEM_CLR;
        end
        else if (!mem[2])              nx.mem   = MEM_WAIT;
      end
      default: begin
        nx.state = S_EEE;
        nx.mem   = MEM_CLR;
      end
    endcase
  end

  // A repressor arrives ({R,C} = 10) at a state with one free outer site:
  // it binds at once (f[0]=0, loc[0]=0), is deferred into mem
  // (f[0]=0, loc[0]=1), or binds and is recorded in mem as fresh
  // (f[0]=1). A deferred repressor (mem[2]=1) binds on the next arrival.
  function automatic lac_step_t bind_outer(lac_step_t h, logic pend,
                                           logic f0, logic l0,
                                           lac_state_e tgt, mem_t fresh);
    lac_step_t s = h;
    if (pend)        s.state = tgt;
    else if (!f0) begin
      if (!l0)       s.state = tgt;
      else           s.mem   = MEM_WAIT;
    end
    else begin
      s.state = tgt;
      s.mem   = fresh;
    end
    return s;
  endfunction

  // {R,C} = 00 at a state with one bound repressor: it leaves, unless a
  // deferral is pending and loc[0]=1, which cancels the deferral instead.
  // A repressor recorded in mem as fresh (own) leaves and clears mem.
  function automatic lac_step_t release_one(lac_step_t h, mem_t m, logic l0,
                                            lac_state_e tgt, mem_t own);
    lac_step_t s = h;
    if (!m[2])              s.state = tgt;
    else if (m == MEM_WAIT) begin
      if (!l0)              s.state = tgt;
      else                  s.mem   = MEM_CLR;
    end
    else if (m == own) begin
      s.state = tgt;
      s.mem   = MEM_CLR;
    end
    return s;
  endfunction

  // R = 0 at a state with repressors at both outer sites: loc[0] picks the
  // one that leaves (0: the first, 1: the third). A pending deferral with
  // loc[1]=1 is cancelled instead. When the repressor recorded in mem as
  // fresh is the one that leaves, mem is cleared. mem = 111 is never
  // stored and has no row: the state is held.
  function automatic lac_step_t release_two(lac_step_t h, mem_t m, logic [1:0] l,
                                            lac_state_e tgt_first_free,
                                            lac_state_e tgt_third_free);
    lac_step_t s = h;
    if (m == MEM_WAIT && l[1]) s.mem = MEM_CLR;
    else if (m != 3'b111) begin
      s.state = l[0] ? tgt_third_free : tgt_first_free;
      if ((m == MEM_FIRST && !l[0]) || (m == MEM_THIRD && l[0]))
        s.mem = MEM_CLR;
    end
    return s;
  endfunction

  // A repressor arrives at a state where it cannot bind: with no deferral
  // pending it is deferred into mem; with one pending, the polymerase or CAP
  // event named by tgt happens instead, with output o.
  function automatic lac_step_t defer_or(lac_step_t h, logic pend,
                                         lac_state_e tgt, lac_out_t o);
    lac_step_t s = h;
    if (!pend)  s.mem = MEM_WAIT;
    else begin
      s.state = tgt;
      s.out   = o;
    end
    return s;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_EEE;
      mem   <= MEM_CLR;
      out   <= OUT_NONE;
    end
    else begin
      state <= nx.state;
      mem   <= nx.mem;
      out   <= nx.out;
    end
  end

endmodule
