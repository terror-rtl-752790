// Shared constants and types of the timing-error tolerant (Terror) link.
//
// W_DEF and B_DEF are the default link width (bit-lines of data) and number of
// pipeline buffers per link; both are the sizes the design is characterised at
// (a 32-bit bus, four buffers per link).  link_mode_e names the operating mode of
// a link buffer: NORMAL (the main flop takes the wire directly), DELAYED (words
// pass through the delayed flop first) and AUX (scheme 2 only: words pass through
// the auxiliary, delayed and main flops in series).
package terror_pkg;
  parameter int unsigned W_DEF = 32;
  parameter int unsigned B_DEF = 4;

  typedef enum logic [1:0] {
    MODE_NORMAL  = 2'd0,
    MODE_DELAYED = 2'd1,
    MODE_AUX     = 2'd2
  } link_mode_e;
endpackage
