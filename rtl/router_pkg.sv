// router_pkg: types and constants shared by the 1x5 store-and-forward router.
//
// Packet format on the input port (one byte per accepted clock edge):
//   byte 0  header, destination address DA. DA[2:0] = 0..4 selects output
//           channel 1..5; DA[7:3] is carried along but not decoded.
//   byte 1  LEN, number of payload bytes that follow, 0..MAX_LEN.
//   byte 2.. LEN payload bytes.
// A packet is therefore 2..64 bytes long. The 8-bit width, five outputs and
// the 0..62 payload range follow the source description; which DA bits are
// decoded is read from the example traffic it shows (byte 8'b1101_0000 leaves
// on channel 1, 8'b1110_1001 on channel 2, and so on).
package router_pkg;

  localparam int DATA_W  = 8;    // byte width of every port
  localparam int N_PORTS = 5;    // number of output channels
  localparam int MAX_LEN = 62;   // largest legal payload length
  localparam int PKT_MAX = MAX_LEN + 2;  // header + length + payload
  localparam int SEL_W   = $clog2(N_PORTS);

  typedef logic [DATA_W-1:0] byte_t;
  typedef logic [SEL_W-1:0]  sel_t;

  // Controller states: four, one per field of the packet plus a discard state.
  typedef enum logic [1:0] {
    S_HDR  = 2'd0,   // waiting for a header byte
    S_LEN  = 2'd1,   // waiting for the length byte
    S_DATA = 2'd2,   // receiving payload bytes
    S_DROP = 2'd3    // discarding a packet with an unroutable header
  } state_t;

  // Write request from the controller/de-mux into one output channel buffer.
  typedef struct packed {
    logic  wr;       // store data this cycle
    logic  last;     // data is the last byte of the packet: commit it
    logic  discard;    // discard the uncommitted part of the current packet
    byte_t data;
  } chan_wr_t;

  // Output channel named by the decoded address bits DA[2:0] of a header;
  // only values below N_PORTS name a channel.
  function automatic logic hdr_ok(logic [2:0] da);
    return da < 3'(N_PORTS);
  endfunction

endpackage
