// tb_host_pkg: testbench-only types shared by host_consumer and the tests
// that drive it.
// The record layout is this test bench's own choice.
package tb_host_pkg;
  // One fragment as sent by a test: EVID, TYPE, SIZE and up to 8 data words
  // (byte k of the fragment is byte k%32 of word k/32, little-endian).
  typedef struct { logic [63:0] evid; logic [7:0] ty; logic [15:0] size; logic [255:0] w [8]; } frag_s;
endpackage
