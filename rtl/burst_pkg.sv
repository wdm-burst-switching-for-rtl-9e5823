// burst_pkg: types and constants shared by the burst switch control path.
//
// A Burst Header Cell (BHC) travels on a link's control channel ahead of its
// burst. It carries the destination address, the output port the IOM looked
// up, an offset (slots from BHC arrival to the first bit of the burst) and a
// length (burst duration in slots), as the burst switching scheme prescribes.
// Inside the switch all elements share one slot clock, so the input module
// also stamps the cell with the absolute arrival time of its burst (t_arr);
// every queue a cell waits in then leaves its timing intact, and the offset
// is recomputed from t_arr wherever a cell leaves an element. The t_arr
// field, the field widths, the burst id used for tracking and the in_port
// field are this design's own choices. The control ring message and the crossbar
// command are also defined here.
package burst_pkg;

  localparam int unsigned TIME_W = 32;  // absolute time in slots
  localparam int unsigned ADDR_W = 32;  // destination address
  localparam int unsigned PORT_W = 16;  // external output port number
  localparam int unsigned OFF_W  = 16;  // BHC offset field, slots
  localparam int unsigned LEN_W  = 16;  // BHC length field, slots
  localparam int unsigned ID_W   = 16;  // burst id (tracking only)
  localparam int unsigned IPRT_W = 8;   // BSE input port index
  localparam int unsigned NODE_W = 8;   // control ring node id
  localparam int unsigned LOC_W  = 8;   // BSU storage location
  localparam int unsigned CHAN_W = 16;  // channel index within a link

  typedef logic [TIME_W-1:0] time_t;

  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic [ADDR_W-1:0] dest_addr;
    logic [PORT_W-1:0] out_port;
    logic [IPRT_W-1:0] in_port;
    logic [OFF_W-1:0]  offset;
    logic [LEN_W-1:0]  length;
    time_t             t_arr;     // absolute burst arrival, inside the switch
  } bhc_t;

  typedef enum logic [1:0] {
    MSG_REQ   = 2'd0,   // BP asks the BSM for a storage location
    MSG_GRANT = 2'd1,   // BSM grants location 'loc'
    MSG_DENY  = 2'd2    // BSM has no free location
  } msg_kind_e;

  typedef struct packed {
    logic              valid;
    logic [NODE_W-1:0] src;
    logic [NODE_W-1:0] dst;
    msg_kind_e         kind;
    time_t             t_in;    // burst enters the BSU
    time_t             t_out;   // burst has fully left the BSU
    logic [LOC_W-1:0]  loc;
  } ring_msg_t;

  // One channel assignment, the setting of the optical crossbar section of
  // an output link: input port, output channel, time and storage use.
  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic [IPRT_W-1:0] in_port;
    logic [CHAN_W-1:0] channel;
    time_t             start;
    logic [LEN_W-1:0]  length;
    logic              via_bsu;
    logic [LOC_W-1:0]  bsu_loc;
    logic              late;     // channel not free at start: sent later
  } xbar_cmd_t;

endpackage
