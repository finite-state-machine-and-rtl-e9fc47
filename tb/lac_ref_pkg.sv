// lac_ref_pkg: reference model of the Lac truth table for the test benches.
//
// The table is held as data, one add() per row, in the same column order as
// the published truth table: start state, mem before, {R,C}, f, loc, sel,
// mem after ("---" = unchanged), out, next state. Patterns use 0, 1 and x
// (don't care). Rows are tried in order and the first match wins; an input
// combination that matches no row holds state and mem with out = 00.
// The reading of the table follows the RTL's documented choices: rows
// printed with identical conditions are split on loc[0], rows whose result
// was lost follow their neighbouring states, and the release rows of ree and
// cpr use mem 101 and 110. State codes are written out here independently
// of the RTL package.
package lac_ref_pkg;

  typedef struct {
    string st, m, rc, f, loc, sel, nm, o, nx;
  } row_t;

  row_t rows[$];

  function automatic void add(string st, string m, string rc, string f,
                              string loc, string sel, string nm, string o,
                              string nx);
    row_t r;
    r.st = st; r.m = m; r.rc = rc; r.f = f; r.loc = loc; r.sel = sel;
    r.nm = nm; r.o = o; r.nx = nx;
    rows.push_back(r);
  endfunction

  function automatic void init();
    rows.delete();
    add("eee","0xx","00","xx","xx","x","---","00","epe");
    add("eee","1xx","00","xx","xx","x","000","00","eee");
    add("eee","xxx","01","xx","x0","x","---","00","cee");
    add("eee","xxx","01","xx","x1","x","---","00","eec");
    add("eee","0xx","10","00","00","x","---","00","ree");
    add("eee","0xx","10","00","01","x","---","00","eer");
    add("eee","0xx","10","00","1x","x","100","00","eee");
    add("eee","0xx","10","01","xx","x","101","00","ree");
    add("eee","0xx","10","10","xx","x","110","00","eer");
    add("eee","0xx","10","11","xx","x","---","00","fef");
    add("eee","1xx","10","xx","x0","x","---","00","ree");
    add("eee","1xx","10","xx","x1","x","---","00","eer");
    add("eee","xxx","11","xx","xx","x","---","00","epe");
    add("eer","0xx","00","xx","xx","x","---","00","eee");
    add("eer","100","00","xx","x0","x","---","00","eee");
    add("eer","100","00","xx","x1","x","000","00","eer");
    add("eer","110","00","xx","xx","x","000","00","eee");
    add("eer","xxx","01","xx","xx","x","---","00","cer");
    add("eer","0xx","10","x0","x0","x","---","00","rer");
    add("eer","0xx","10","x0","x1","x","100","00","eer");
    add("eer","0xx","10","x1","xx","x","101","00","rer");
    add("eer","1xx","10","xx","xx","x","---","00","rer");
    add("eer","xxx","11","xx","xx","x","---","00","epr");
    add("eec","0xx","00","xx","xx","x","---","00","eee");
    add("eec","1xx","00","xx","xx","0","000","00","eec");
    add("eec","1xx","00","xx","xx","1","---","00","eee");
    add("eec","xxx","01","xx","xx","x","---","00","cec");
    add("eec","0xx","10","x0","x0","x","---","00","rec");
    add("eec","0xx","10","x0","x1","x","100","00","eec");
    add("eec","0xx","10","x1","xx","x","101","00","rec");
    add("eec","1xx","10","xx","xx","x","---","00","rec");
    add("eec","xxx","11","xx","xx","x","---","00","epc");
    add("epe","0xx","00","xx","xx","x","---","01","eee");
    add("epe","1xx","00","xx","xx","x","000","00","epe");
    add("epe","xxx","01","xx","x0","x","---","00","cpe");
    add("epe","xxx","01","xx","x1","x","---","00","epc");
    add("epe","0xx","10","00","00","x","---","00","rpe");
    add("epe","0xx","10","00","01","x","---","00","epr");
    add("epe","0xx","10","00","1x","x","100","00","epe");
    add("epe","0xx","10","01","xx","x","101","00","rpe");
    add("epe","0xx","10","10","xx","x","110","00","epr");
    add("epe","0xx","10","11","x0","x","---","00","rpe");
    add("epe","0xx","10","11","x1","x","---","00","epr");
    add("epe","1xx","10","xx","x0","x","---","00","rpe");
    add("epe","1xx","10","xx","x1","x","---","00","epr");
    add("epe","xxx","11","xx","xx","x","---","01","eee");
    add("epr","0xx","00","xx","xx","x","---","00","epe");
    add("epr","100","00","xx","x0","x","---","00","epe");
    add("epr","100","00","xx","x1","x","000","00","epr");
    add("epr","110","00","xx","xx","x","000","00","epe");
    add("epr","xxx","01","xx","xx","x","---","00","cpr");
    add("epr","0xx","10","x0","x0","x","---","00","rpr");
    add("epr","0xx","10","x0","x1","x","100","00","epr");
    add("epr","0xx","10","x1","xx","x","101","00","rpr");
    add("epr","1xx","10","xx","xx","x","---","00","rpr");
    add("epr","xxx","11","xx","xx","x","---","00","eer");
    add("epc","0xx","00","xx","xx","x","---","00","epe");
    add("epc","1xx","00","xx","xx","0","000","00","epc");
    add("epc","1xx","00","xx","xx","1","---","00","epe");
    add("epc","xxx","01","xx","xx","x","---","00","cpc");
    add("epc","0xx","10","x0","x0","x","---","00","rpc");
    add("epc","0xx","10","x0","x1","x","100","00","epc");
    add("epc","0xx","10","x1","xx","x","101","00","rpc");
    add("epc","1xx","10","xx","xx","x","---","00","rpc");
    add("epc","xxx","11","xx","xx","x","---","10","eec");
    add("ree","0xx","00","xx","xx","x","---","00","eee");
    add("ree","100","00","xx","x0","x","---","00","eee");
    add("ree","100","00","xx","x1","x","000","00","ree");
    add("ree","101","00","xx","xx","x","000","00","eee");
    add("ree","xxx","01","xx","xx","x","---","00","rec");
    add("ree","0xx","10","x0","x0","x","---","00","rer");
    add("ree","0xx","10","x0","x1","x","100","00","ree");
    add("ree","0xx","10","x1","xx","x","110","00","rer");
    add("ree","1xx","10","xx","xx","x","---","00","rer");
    add("ree","xxx","11","xx","xx","x","---","00","rpe");
    add("rer","0xx","0x","xx","x0","x","---","00","eer");
    add("rer","0xx","0x","xx","x1","x","---","00","ree");
    add("rer","100","0x","xx","00","x","---","00","eer");
    add("rer","100","0x","xx","01","x","---","00","ree");
    add("rer","100","0x","xx","1x","x","000","00","rer");
    add("rer","101","0x","xx","x0","x","000","00","eer");
    add("rer","101","0x","xx","x1","x","---","00","ree");
    add("rer","110","0x","xx","x0","x","---","00","eer");
    add("rer","110","0x","xx","x1","x","000","00","ree");
    add("rer","0xx","1x","xx","xx","x","100","00","rer");
    add("rer","1xx","1x","xx","xx","x","---","00","rpr");
    add("rec","0xx","00","xx","xx","0","---","00","eec");
    add("rec","100","00","xx","x0","0","---","00","eec");
    add("rec","100","00","xx","x1","0","000","00","rec");
    add("rec","101","00","xx","xx","0","000","00","eec");
    add("rec","xxx","00","xx","xx","1","---","00","ree");
    add("rec","xxx","01","xx","xx","x","---","00","rpc");
    add("rec","0xx","10","xx","xx","x","100","00","rec");
    add("rec","1xx","10","xx","xx","x","---","00","rpc");
    add("rec","xxx","11","xx","xx","x","---","00","rpc");
    add("rpe","0xx","00","xx","xx","x","---","00","epe");
    add("rpe","100","00","xx","x0","x","---","00","epe");
    add("rpe","100","00","xx","x1","x","000","00","rpe");
    add("rpe","101","00","xx","xx","x","000","00","epe");
    add("rpe","xxx","01","xx","xx","x","---","00","rpc");
    add("rpe","0xx","10","x0","x0","x","---","00","rpr");
    add("rpe","0xx","10","x0","x1","x","100","00","rpe");
    add("rpe","0xx","10","x1","xx","x","110","00","rpr");
    add("rpe","1xx","10","xx","xx","x","---","00","rpr");
    add("rpe","xxx","11","xx","xx","x","---","01","ree");
    add("rpr","0xx","0x","xx","x0","x","---","00","epr");
    add("rpr","0xx","0x","xx","x1","x","---","00","rpe");
    add("rpr","100","0x","xx","00","x","---","00","epr");
    add("rpr","100","0x","xx","01","x","---","00","rpe");
    add("rpr","100","0x","xx","1x","x","000","00","rpr");
    add("rpr","101","0x","xx","x0","x","000","00","epr");
    add("rpr","101","0x","xx","x1","x","---","00","rpe");
    add("rpr","110","0x","xx","x0","x","---","00","epr");
    add("rpr","110","0x","xx","x1","x","000","00","rpe");
    add("rpr","0xx","1x","xx","xx","x","100","00","rpr");
    add("rpr","1xx","1x","xx","xx","x","---","00","rer");
    add("rpc","0xx","00","xx","xx","0","---","00","epc");
    add("rpc","100","00","xx","x0","0","---","00","epc");
    add("rpc","100","00","xx","x1","0","000","00","rpc");
    add("rpc","101","00","xx","xx","0","000","00","epc");
    add("rpc","xxx","00","xx","xx","1","---","00","rpe");
    add("rpc","xxx","01","xx","xx","x","---","10","rec");
    add("rpc","0xx","10","xx","xx","x","100","00","rpc");
    add("rpc","1xx","10","xx","xx","x","---","10","rec");
    add("rpc","xxx","11","xx","xx","x","---","10","rec");
    add("cee","0xx","00","xx","xx","x","---","00","eee");
    add("cee","1xx","00","xx","xx","0","000","00","cee");
    add("cee","1xx","00","xx","xx","1","---","00","eee");
    add("cee","xxx","01","xx","xx","x","---","00","cec");
    add("cee","0xx","10","x0","x0","x","---","00","cer");
    add("cee","0xx","10","x0","x1","x","100","00","cee");
    add("cee","0xx","10","x1","xx","x","110","00","cer");
    add("cee","1xx","10","xx","xx","x","---","00","cer");
    add("cee","xxx","11","xx","xx","x","---","00","cpe");
    add("cer","0xx","00","xx","xx","0","---","00","cee");
    add("cer","0xx","00","xx","xx","1","---","00","eer");
    add("cer","100","00","xx","x0","0","000","00","cee");
    add("cer","100","00","xx","x1","0","000","00","cer");
    add("cer","100","00","xx","xx","1","---","00","eer");
    add("cer","110","00","xx","xx","0","000","00","cee");
    add("cer","110","00","xx","xx","1","---","00","eer");
    add("cer","xxx","01","xx","xx","x","---","00","cpr");
    add("cer","0xx","10","xx","xx","x","100","00","cer");
    add("cer","1xx","10","xx","xx","x","---","00","cpr");
    add("cer","xxx","11","xx","xx","x","---","00","cpr");
    add("cec","0xx","00","xx","x0","x","---","00","eec");
    add("cec","0xx","00","xx","x1","x","---","00","cee");
    add("cec","1xx","00","xx","xx","0","000","00","cec");
    add("cec","1xx","00","xx","x0","1","---","00","eec");
    add("cec","1xx","00","xx","x1","1","---","00","cee");
    add("cec","xxx","01","xx","xx","x","---","00","cpc");
    add("cec","0xx","10","xx","xx","x","100","00","cec");
    add("cec","1xx","10","xx","xx","x","---","00","cpc");
    add("cec","xxx","11","xx","xx","x","---","00","cpc");
    add("cpe","0xx","00","xx","xx","x","---","00","epe");
    add("cpe","1xx","00","xx","xx","0","000","00","cpe");
    add("cpe","1xx","00","xx","xx","1","---","00","epe");
    add("cpe","xxx","01","xx","xx","x","---","00","cpc");
    add("cpe","0xx","10","x0","x0","x","---","00","cpr");
    add("cpe","0xx","10","x0","x1","x","100","00","cpe");
    add("cpe","0xx","10","x1","xx","x","110","00","cpr");
    add("cpe","1xx","10","xx","xx","x","---","00","cpr");
    add("cpe","xxx","11","xx","xx","x","---","10","cee");
    add("cpr","0xx","00","xx","xx","0","---","00","cpe");
    add("cpr","0xx","00","xx","xx","1","---","00","epr");
    add("cpr","100","00","xx","x0","0","---","00","cpe");
    add("cpr","100","00","xx","x1","0","000","00","cpr");
    add("cpr","100","00","xx","xx","1","---","00","epr");
    add("cpr","110","00","xx","xx","0","000","00","cpe");
    add("cpr","110","00","xx","xx","1","---","00","epr");
    add("cpr","xxx","01","xx","xx","x","---","00","cer");
    add("cpr","0xx","10","xx","xx","x","100","00","cpr");
    add("cpr","1xx","10","xx","xx","x","---","00","cer");
    add("cpr","xxx","11","xx","xx","x","---","00","cer");
    add("cpc","0xx","00","xx","x0","x","---","00","epc");
    add("cpc","0xx","00","xx","x1","x","---","00","cpe");
    add("cpc","1xx","00","xx","xx","0","000","00","cpc");
    add("cpc","1xx","00","xx","x0","1","---","00","epc");
    add("cpc","1xx","00","xx","x1","1","---","00","cpe");
    add("cpc","xxx","01","xx","xx","x","---","11","cec");
    add("cpc","0xx","10","xx","xx","x","100","00","cpc");
    add("cpc","1xx","10","xx","xx","x","---","11","cec");
    add("cpc","xxx","11","xx","xx","x","---","11","cec");
    add("fef","0xx","0x","xx","xx","x","---","00","eee");
    add("fef","1xx","0x","xx","x0","x","---","00","eee");
    add("fef","1xx","0x","xx","x1","x","000","00","fef");
    add("fef","0xx","1x","xx","xx","x","100","00","fef");
    add("fef","1xx","1x","xx","xx","x","---","00","fef");
  endfunction

  function automatic logic [4:0] code(string name);
    case (name)
      "eee": return 5'b00000;  "eer": return 5'b00001;  "eec": return 5'b00011;
      "epe": return 5'b00110;  "epr": return 5'b01001;  "epc": return 5'b01101;
      "ree": return 5'b00010;  "rer": return 5'b00111;  "rec": return 5'b01010;
      "rpe": return 5'b01011;  "rpr": return 5'b01111;  "rpc": return 5'b10001;
      "cee": return 5'b00100;  "cer": return 5'b01000;  "cec": return 5'b01100;
      "cpe": return 5'b01110;  "cpr": return 5'b10000;  "cpc": return 5'b10010;
      "fef": return 5'b00101;
      default: return 5'b11111;
    endcase
  endfunction

  function automatic string name_of(logic [4:0] c);
    string names[19] = '{"eee","eer","eec","epe","epr","epc","ree","rer","rec",
                         "rpe","rpr","rpc","cee","cer","cec","cpe","cpr","cpc","fef"};
    foreach (names[i]) if (code(names[i]) == c) return names[i];
    return "???";
  endfunction

  // Does value v (its low pat.len() bits) match pattern pat, MSB first?
  function automatic bit match(string pat, logic [7:0] v);
    int n = pat.len();
    for (int i = 0; i < n; i++) begin
      byte ch = pat[i];
      logic b = v[n-1-i];
      if (ch == "0" && b != 1'b0) return 0;
      if (ch == "1" && b != 1'b1) return 0;
    end
    return 1;
  endfunction

  function automatic logic [7:0] bits_of(string pat);
    logic [7:0] v = '0;
    for (int i = 0; i < pat.len(); i++) v = {v[6:0], pat[i] == "1"};
    return v;
  endfunction

  // Expected result of one transition; returns the matching row index, or
  // -1 when no row matches (state and mem held, out 00).
  function automatic int step(logic [4:0] st, logic [2:0] m, logic r, logic c,
                              logic [1:0] f, logic [1:0] loc, logic sel,
                              output logic [4:0] nst, output logic [2:0] nm,
                              output logic [1:0] o);
    nst = st; nm = m; o = 2'b00;
    foreach (rows[i]) begin
      if (code(rows[i].st) == st && match(rows[i].m, 8'(m)) &&
          match(rows[i].rc, 8'({r, c})) && match(rows[i].f, 8'(f)) &&
          match(rows[i].loc, 8'(loc)) && match(rows[i].sel, 8'(sel))) begin
        nst = code(rows[i].nx);
        if (rows[i].nm != "---") nm = bits_of(rows[i].nm)[2:0];
        o = bits_of(rows[i].o)[1:0];
        return i;
      end
    end
    return -1;
  endfunction

endpackage
