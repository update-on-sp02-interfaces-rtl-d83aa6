// sp02_pkg: types and constants shared by the SP02 interface logic.
//
// The MPC link word (lct_t) follows the two 16-bit MPC frames bit for bit:
// frame 1 is bits [31:16], frame 2 is bits [15:0]. The muon record (muon_t)
// follows the 20-bit per-muon field list of the Muon Sorter interface. The
// DDU readout modes are the four columns of the DDU payload estimate. The
// constants that are not set by the interface definitions (word layouts of
// the DDU header, the CCB command codes) live in the modules that use them.
package sp02_pkg;

  // Bunch crossings per LHC orbit: BXN runs from 0 to 3563.
  localparam int unsigned BX_PER_ORBIT = 3564;
  localparam int unsigned BXN_W        = 12;

  // One correlated LCT as sent by the MPC, frame 1 then frame 2.
  typedef struct packed {
    logic       vp;        // valid pattern
    logic [3:0] quality;   // more hits -> higher quality
    logic [3:0] clct_pat;  // CLCT pattern number
    logic [6:0] wg;        // wire group ID, 0..111
    logic [3:0] csc_id;    // chamber number, 1..9
    logic       bc0;       // bunch crossing zero flag
    logic       bx0;       // LSB of the bunch crossing number
    logic       se;        // synchronization error
    logic       lr;        // left/right bend
    logic [7:0] hs;        // CLCT pattern ID (half-strip or di-strip at key layer)
  } lct_t;

  // One muon candidate sent to the Muon Sorter.
  typedef struct packed {
    logic [4:0] phi;       // azimuth
    logic [4:0] eta;       // pseudorapidity
    logic [6:0] rank;      // 5 bits pT + 2 bits quality
    logic       vc;        // valid charge (8th bit of the rank LUT)
    logic       halo;      // halo muon
    logic       charge;    // muon sign
  } muon_t;

  localparam int unsigned NMUON = 3;

  // DDU readout modes, one per column of the payload estimate.
  typedef enum logic [1:0] {
    DDU_FULL   = 2'd0,   // all input data
    DDU_ZS     = 2'd1,   // zero-suppressed input blocks
    DDU_HDR    = 2'd2,   // SOF, header, EOF
    DDU_FMONLY = 2'd3    // SOF and EOF only, carrying the FM state
  } ddu_mode_e;

  // The four Fast Monitoring lines; ERR is sent as rdy = bsy = 1.
  typedef struct packed {
    logic rdy;
    logic bsy;
    logic wof;
    logic osy;
  } fm_t;

  // VME address modifiers accepted by the A24 slave.
  function automatic logic am_is_a24(input logic [5:0] am);
    return am inside {6'h39, 6'h3A, 6'h3B, 6'h3D, 6'h3E, 6'h3F};
  endfunction

endpackage
