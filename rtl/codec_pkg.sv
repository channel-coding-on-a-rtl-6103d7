// codec_pkg: constants, types and trellis functions shared by the CCSDS
// (7, 1/2) convolutional encoder and the hard-decision Viterbi decoder.
//
// Code: constraint length K = 7, generator polynomials G1 = 171 and G2 = 133
// (octal). A polynomial's MSB taps the current input bit, its LSB the oldest
// register cell. The encoder state is the 6-bit register s[5:0] where s[5]
// holds the most recent input; a new input b moves the state from s to
// {b, s[5:1]}. In this numbering the two source states of a trellis
// butterfly are 2k and 2k+1 and its destinations k and k+32, and the input
// bit equals the destination's MSB.
//
// The decoder control bundle dec_ctl_t carries the control unit's strobes
// (bmsig, muxsig, acssig, musig, minsig, memwrite, memread, tbenb, tbsig)
// plus addresses; all are active high and valid for one clock cycle.
package codec_pkg;

  localparam int unsigned K      = 7;
  localparam int unsigned NSTATE = 1 << (K - 1);  // 64 trellis states
  localparam int unsigned NBFLY  = NSTATE / 2;    // 32 butterflies
  localparam int unsigned SW     = K - 1;         // state width
  localparam logic [K-1:0] G1    = 7'o171;
  localparam logic [K-1:0] G2    = 7'o133;
  localparam int unsigned ADDR_W = 8;             // trace-back depths up to 256

  typedef logic [1:0] bm_t;                       // branch metric, 0..2
  typedef bm_t [3:0]  bm_vec_t;                   // BM0..BM3

  // Branch-word {C1, C2} (no inversion) leaving state s on input b.
  function automatic logic [1:0] branch_word(input logic [SW-1:0] s, input logic b);
    logic [K-1:0] r;
    r = {b, s};
    return {^(r & G1), ^(r & G2)};
  endfunction

  // Control bundle from dec_control to the decoder datapath.
  typedef struct packed {
    logic              bmsig;     // BMU: compute branch metrics of the input
    logic              muxsig;    // MUX: load ACS input path metrics
    logic              first;     // MUX: select the initial path metrics
    logic              acssig;    // ACSU: register new metrics and decisions
    logic              musig;     // MU: write the decision vector
    logic [ADDR_W-1:0] wr_addr;   // MU: time index inside the block
    logic              minsig;    // MINU: start minimum search
    logic              memwrite;  // MU: advance write-select FSM
    logic              memread;   // MU: advance read-select FSM
    logic              rd_en;     // MU: read a decision vector
    logic [ADDR_W-1:0] rd_addr;   // MU: time index read
    logic              tbenb;     // TBU: trace-back step
    logic              tbstart;   // TBU: first step, take the minimum state
    logic              tbsig;     // TBU: save the output bit
    logic              tblast;    // TBU: last step of the block
  } dec_ctl_t;

endpackage
