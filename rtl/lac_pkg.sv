// lac_pkg: types and constants shared by the digital lac operon.
//
// The lac control region is abstracted as three binding sites, written as a
// three-letter state name:
//   letter 1 - first site:  e (empty), r (repressor), c (CAP)
//   letter 2 - middle site: e (empty), p (RNA polymerase)
//   letter 3 - third site:  e (empty), r (repressor), c (CAP)
// plus one extra state, fef, in which both outer sites are held together.
// That gives 18 + 1 = 19 states. Their 5-bit codes are the ones of the
// published truth table; the 13 other codes are unused.
//
// The 3-bit memory register mem records a pending binding event:
//   000  nothing pending
//   100  a repressor arrived but the binding was deferred
//   101  a repressor has just bound at the first site
//   110  a repressor has just bound at the third site
// These meanings are read off the transition table; the table itself only
// gives the bit patterns.
//
// The 2-bit output out is 00 for every transition except those in which the
// polymerase leaves the promoter and transcribes; it then grades the level
// (01 basal, 10 with CAP at one site, 11 with CAP at both).
package lac_pkg;

  typedef enum logic [4:0] {
    S_EEE = 5'b00000,  // l0
    S_EER = 5'b00001,  // l1
    S_EEC = 5'b00011,  // l2
    S_EPE = 5'b00110,  // l3
    S_EPR = 5'b01001,  // l4
    S_EPC = 5'b01101,  // l5
    S_REE = 5'b00010,  // l6
    S_RER = 5'b00111,  // l7
    S_REC = 5'b01010,  // l8
    S_RPE = 5'b01011,  // l9
    S_RPR = 5'b01111,  // l10
    S_RPC = 5'b10001,  // l11
    S_CEE = 5'b00100,  // l12
    S_CER = 5'b01000,  // l13
    S_CEC = 5'b01100,  // l14
    S_CPE = 5'b01110,  // l15
    S_CPR = 5'b10000,  // l16
    S_CPC = 5'b10010,  // l17
    S_FEF = 5'b00101   // l18
  } lac_state_e;

  typedef logic [2:0] mem_t;
  localparam mem_t MEM_CLR   = 3'b000;
  localparam mem_t MEM_WAIT  = 3'b100;
  localparam mem_t MEM_FIRST = 3'b101;
  localparam mem_t MEM_THIRD = 3'b110;

  typedef logic [1:0] lac_out_t;
  localparam lac_out_t OUT_NONE  = 2'b00;
  localparam lac_out_t OUT_BASAL = 2'b01;
  localparam lac_out_t OUT_CAP1  = 2'b10;
  localparam lac_out_t OUT_CAP2  = 2'b11;

  // Everything one transition produces.
  typedef struct packed {
    lac_state_e state;
    mem_t       mem;
    lac_out_t   out;
  } lac_step_t;

  // The five random bits consumed by one transition.
  typedef struct packed {
    logic [1:0] f;
    logic [1:0] loc;
    logic       sel;
  } lac_rand_t;

endpackage
