// sl_pkg: types and constants shared by the Sector-Logic/RX logic.
//
// The 16-bit PAD trigger word layout (pad_trig_t) and the field widths of the
// trigger pipeline (9 bits per PAD in, 8 bits after the overlap stage, 11 bits
// per selected candidate, 3-bit BCID) follow the board's published formats.
// The packing of the 32-bit MUCTPI word, the read-out frame marker nibbles
// (PAD header 0101, PAD footer 0111, RX header 1001, RX footer 1011) and the
// frame layouts are the board's; the place of the L1-ID/BC-ID tag inside the
// PAD header status byte and the SL register map are this design's choices.
package sl_pkg;

  localparam int unsigned NPAD = 8;          // optical links / PADs per board

  // 16-bit PAD trigger word
  typedef struct packed {
    logic       busy_xoff;   // 15
    logic [2:0] rsv_hi;      // 14:12
    logic [2:0] bcid;        // 11:9
    logic       rsv8;        // 8
    logic       ovl_eta;     // 7
    logic       ovl_phi;     // 6
    logic       hit_opl;     // 5
    logic [2:0] thr;         // 4:2
    logic [1:0] roi;         // 1:0
  } pad_trig_t;

  // 9-bit PAD candidate entering the pipeline
  typedef struct packed {
    logic       valid;
    logic       ovl_eta;
    logic       ovl_phi;
    logic       hit_opl;
    logic [2:0] thr;
    logic [1:0] roi;
  } pad_cand_t;

  // 8-bit candidate after the eta-overlap stage
  typedef struct packed {
    logic       valid;
    logic       ovl_phi;
    logic       hit_opl;
    logic [2:0] thr;
    logic [1:0] roi;
  } cand_t;

  // 11-bit selected muon candidate: candidate plus the PAD it came from
  typedef struct packed {
    cand_t      c;
    logic [2:0] pad;
  } sel_cand_t;

  // 32-bit word to the MUCTPI
  typedef struct packed {
    logic [5:0] zero;        // 31:26
    logic [2:0] bcid;        // 25:23
    logic       more2;       // 22   more than two candidates in the sector
    sel_cand_t  cand1;       // 21:11 second candidate
    sel_cand_t  cand0;       // 10:0  first (highest) candidate
  } muctpi_word_t;

  // Entry of the trigger FIFO read by the event builder
  typedef struct packed {
    logic [11:0]  l1id;
    logic [11:0]  bcid;
    muctpi_word_t trig;
  } trig_entry_t;

  localparam logic [3:0] PAD_HDR = 4'b0101;
  localparam logic [3:0] PAD_FTR = 4'b0111;
  localparam logic [3:0] RX_HDR  = 4'b1001;
  localparam logic [3:0] RX_FTR  = 4'b1011;

  function automatic pad_cand_t to_pad_cand(input logic dv, input pad_trig_t w);
    return '{valid: dv, ovl_eta: w.ovl_eta, ovl_phi: w.ovl_phi,
             hit_opl: w.hit_opl, thr: w.thr, roi: w.roi};
  endfunction

  // Matrix-comparator rule: candidate i beats j when it is valid and j is not,
  // or both are valid and i has the higher threshold, or equal threshold and
  // the lower PAD number.
  function automatic logic beats(input cand_t a, input int unsigned ia,
                                 input cand_t b, input int unsigned ib);
    if (!a.valid) return 1'b0;
    if (!b.valid) return 1'b1;
    if (a.thr != b.thr) return a.thr > b.thr;
    return ia < ib;
  endfunction

endpackage
