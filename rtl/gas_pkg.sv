// gas_pkg: types, message formats and routing shared by the GAScore remote
// memory access infrastructure.
//
// All links carry 33-bit words: 32 data bits plus one control bit. On the FSL
// links between a computing element and its GAScore the control bit marks the
// first (header) word of a message; on the network links it marks the last
// word of a packet. The word formats below are this design's own choice; the
// fields follow the parameters of a GASNet Core API Active Message call.
//
// Network packet:   header | [dst address | word count | payload...] | args...
// FSL 1 (call):     header with token | [address | word count] | args...
// FSL 3 (request):  header with node or token | [src addr | dst addr | count] | args...
// FSL 4 (done):     the request header, echoed
// FSL 2 (return):   token in bits [7:0]
package gas_pkg;

  localparam int unsigned DW        = 32;   // FSL and network data width
  localparam int unsigned LW        = DW+1; // link word: {ctrl, data}
  localparam int unsigned NODE_W    = 8;
  localparam int unsigned PES_PER_FPGA = 4;
  localparam int unsigned PORT_HOST = 4;    // NetIf index of the processor node
  localparam int unsigned PORT_CW   = 5;    // NetIf index of the OCCC to FPGA+1
  localparam int unsigned PORT_CCW  = 6;    // NetIf index of the OCCC to FPGA-1
  localparam int unsigned NPORT     = 7;    // NetIfs per FPGA
  localparam int unsigned HOST_BASE = 16;   // node id of FPGA 0's processor

  typedef logic [LW-1:0] lword_t;

  // Header word. node is the destination on the network and in an FSL 3
  // request, the token on FSL 1 and in an FSL 3 reply request.
  typedef struct packed {
    logic [7:0] node;
    logic [7:0] src;      // source node on the network, 0 elsewhere
    logic [7:0] handler;
    logic [3:0] nargs;
    logic       reply;
    logic       is_long;
    logic [1:0] rsvd;
  } am_hdr_t;

  // Per-node event pulses, brought up to the top for monitoring.
  typedef struct packed {
    logic rx_short;     // a short message's handler call started
    logic rx_long;      // a long message was written and its call started
    logic tx_reply;     // a reply was sent (destination from the token buffer)
    logic tx_done;      // a request completed (FSL 4)
    logic mem_conflict; // receive writes and transmit reads met at the memory
    logic tok_full;     // no free token
    logic prog;         // a sequencer instruction word was loaded
    logic pams_reply;   // the sequencer answered a poll or remote read
    logic send;         // the sequencer program sent a message
  } node_ev_t;

  // Handler codes interpreted by the sequencer itself.
  localparam logic [7:0] H_PROG       = 8'hF0; // args: addr, instr words...
  localparam logic [7:0] H_START      = 8'hF1; // arg: start address
  localparam logic [7:0] H_POLL       = 8'hF2; // answered with H_POLL_REPLY
  localparam logic [7:0] H_POLL_REPLY = 8'hF3; // arg: ArrivalTime
  localparam logic [7:0] H_GET        = 8'hF4; // args: src, dst, count, reply handler

  // Sequencer opcodes, bits [31:28] of an instruction word.
  typedef enum logic [3:0] {
    OP_HALT      = 4'h0,
    OP_TIMER_THR = 4'h1, // next word: timer threshold
    OP_TIMER_OFS = 4'h2, // next word: offset added to the timer
    OP_MSGCTR    = 4'h3, // [25:24] counter, [23:16] handler, [15:0] threshold
    OP_XFERCTR   = 4'h4, // same, threshold in words
    OP_CTRL      = 4'h5, // [7:0] control outputs
    OP_WAIT      = 4'h6, // [16] timer, [15:12] msg, [11:8] xfer, [7:4] in mask, [3:0] in value
    OP_SEND      = 4'h7  // [27:20] node, [19:12] handler, [11:8] code args,
                         // [7] long, [6] +timer, [5] +ArrivalTime; long: 3 words; then args
  } pams_op_e;

  function automatic logic [31:0] hdr_word(am_hdr_t h);
    return h;
  endfunction

  // FPGA holding a node: PEs 0..15 four per FPGA, processors 16.. one per FPGA.
  function automatic int unsigned node_fpga(logic [7:0] n);
    return (32'(n) >= HOST_BASE) ? int'(n) - HOST_BASE : int'(n) / PES_PER_FPGA;
  endfunction

  // NetIf port that leads towards node dst, seen from FPGA my_fpga.
  function automatic int unsigned route_port(logic [7:0] dst, int unsigned my_fpga,
                                             int unsigned n_fpga);
    int unsigned f, cw;
    f = node_fpga(dst);
    if (f == my_fpga)
      return (32'(dst) >= HOST_BASE) ? PORT_HOST : int'(dst) % PES_PER_FPGA;
    cw = (f + n_fpga - my_fpga) % n_fpga;
    return (2*cw <= n_fpga) ? PORT_CW : PORT_CCW;
  endfunction

endpackage
