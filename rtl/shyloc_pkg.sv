// shyloc_pkg: types and constants shared by the CCSDS-121 block-adaptive coder
// and the CCSDS-123 BIP-MEM predictor.
//
// The CCSDS-121 side codes blocks of J mapped residuals with the option that gives
// the shortest output (zero-block, second extension, fundamental sequence, sample
// splitting with k = 1..K_MAX, no compression). Option identifiers follow the
// CCSDS 121.0 tables: ID_LEN bits, all zeros plus one extra bit for the two
// low-entropy options, all ones for no compression, k+1 for splitting (FS is k = 0).
// Coded bits travel between the coder stages as fields: up to 32 bits, right
// aligned, with their length; the packer concatenates them MSB first.
package shyloc_pkg;

  // Width of one coded field and of the packed output word.
  localparam int unsigned FIELD_W = 32;
  localparam int unsigned LEN_BITS = 6;   // field length 0..32

  typedef struct packed {
    logic [FIELD_W-1:0]  bits;   // right aligned
    logic [LEN_BITS-1:0] len;    // number of valid bits, 0..32
  } field_t;

  typedef enum logic [2:0] {
    OPT_ZB = 3'd0,   // zero-block (run of all-zero blocks)
    OPT_SE = 3'd1,   // second extension
    OPT_K  = 3'd2,   // FS (k = 0) or sample splitting with k > 0
    OPT_NC = 3'd3    // no compression
  } option_e;

  // Configuration of the CCSDS-121 IP (run time).
  typedef struct packed {
    logic        preproc_en;    // unit-delay predictor in use (else input is already mapped)
    logic        signed_in;     // input samples are two's complement
    logic [12:0] ref_interval;  // r: one reference sample every r blocks (1..4096, 0 = 4096)
  } c121_cfg_t;

  // Identifier length of CCSDS 121.0 for resolution n bits.
  function automatic int unsigned id_len(input int unsigned n);
    if (n <= 2)       return 1;
    else if (n <= 4)  return 2;
    else if (n <= 8)  return 3;
    else if (n <= 16) return 4;
    else              return 5;
  endfunction

  // Largest splitting parameter: identifiers 2 .. 2^ID_LEN-2 code k = 1 .. 2^ID_LEN-3.
  function automatic int unsigned k_max(input int unsigned n);
    int unsigned km;
    km = (1 << id_len(n)) - 3;
    if (km > n - 1) km = n - 1;
    if (km < 1) km = 1;
    return km;
  endfunction

  // AHB encodings used by the external-memory master.
  typedef enum logic [1:0] {
    HTRANS_IDLE = 2'b00, HTRANS_BUSY = 2'b01, HTRANS_NONSEQ = 2'b10, HTRANS_SEQ = 2'b11
  } htrans_e;

  localparam logic [2:0] HBURST_SINGLE = 3'b000;
  localparam logic [2:0] HBURST_INCR   = 3'b001;
  localparam logic [2:0] HBURST_INCR4  = 3'b011;
  localparam logic [2:0] HBURST_INCR8  = 3'b101;
  localparam logic [2:0] HBURST_INCR16 = 3'b111;
  localparam logic [2:0] HSIZE_WORD    = 3'b010;

endpackage
