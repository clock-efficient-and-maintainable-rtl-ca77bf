// Shared types and constants of the header/data serializer.
//
// The serializer sends a record made of up to three optional header bytes
// (H_A, H_B, H_C, each with its own enable) followed by NINPUTS data bytes.
// The default record length and the header values are those of the worked
// example the design follows: header bytes 0x8A, 0x8B, 0x8C and data bytes
// D_0..D_10, i.e. eleven data bytes.  The state encoding is this design's own
// choice (a plain binary enum; synthesis may re-encode it).
package serializer_pkg;

  typedef logic [7:0] byte_t;

  // Number of parallel data bytes in one record.
  localparam int unsigned DEF_NINPUTS = 11;

  // Header byte values.
  localparam byte_t DEF_HEADER_A = 8'h8A;
  localparam byte_t DEF_HEADER_B = 8'h8B;
  localparam byte_t DEF_HEADER_C = 8'h8C;

  // One state per step of the record.  With fall-through, several of these
  // steps may be evaluated in one clock cycle.
  typedef enum logic [2:0] {
    ST_IDLE  = 3'd0,
    ST_HDR_A = 3'd1,
    ST_HDR_B = 3'd2,
    ST_HDR_C = 3'd3,
    ST_SEND  = 3'd4
  } state_t;

endpackage
