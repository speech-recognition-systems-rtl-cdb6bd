// srs_pkg: sizes and shared types of the speech-recognition pattern matching
// hardware. The defaults follow the three-word example system: three words,
// three-state HMMs, 128-entry local cache memories of one byte each and an
// 8-bit score datapath. The BIST control bundle broadcast to every cache
// memory lane is defined here too.
package srs_pkg;

  localparam int unsigned WORDS    = 3;    // words in the vocabulary (one HMM block each)
  localparam int unsigned STATES   = 3;    // states per HMM
  localparam int unsigned CB_DEPTH = 128;  // entries in a local cache memory
  localparam int unsigned LABEL_W  = $clog2(CB_DEPTH);
  localparam int unsigned SCORE_W  = 8;    // datapath width of the HMM blocks
  localparam int unsigned MISR_W   = 16;   // signature register width (own choice)

  // Control bundle the transparent BIST sequencer sends to every memory lane.
  // "Write" fields apply in the cycle they are issued; "read" fields describe
  // the read data that is on the memory output in the current cycle (the read
  // was issued one cycle earlier).
  typedef struct packed {
    logic active;     // BIST owns the cache memory port
    logic mem_en;     // memory access this cycle
    logic mem_we;     // the access is a write
    logic w_inv;      // write ~a instead of a
    logic rd_misr;    // inject the read data into the MISR
    logic rd_inv;     // invert the read data before injecting it (prediction phase)
    logic a_load;     // read data is the element's first read: recover a from it
    logic a_inv;      // a = ~read data
    logic sig_save;   // predicted signature complete: store it, clear the MISR
    logic compare;    // test signature complete: compare with the prediction
  } bist_ctl_t;

endpackage
