// apr_pkg: constants and types shared by the Communication IP.
//
// Every packet travels as a sequence of 128-bit flits: one header flit, 1 to
// MAX_LEN payload flits and one footer flit. The 128-bit width is the router
// port width given for the design (128 bits at 100 MHz, 12.8 Gbit/s raw).
// The header and footer layouts, the 4-bit coordinate per dimension and the
// 256-word packet limit are this design's own choices. Task and channel
// identifiers are 2 and 7 bits wide (tasks 0-3, channels 0-127), as in the
// send()/receive() API of the framework. Two virtual channels share each
// physical inter-node channel.
package apr_pkg;

  localparam int unsigned FLIT_W   = 128;  // router port datapath
  localparam int unsigned MAX_DIMS = 3;    // coordinates a header can carry
  localparam int unsigned COORD_W  = 4;    // bits per coordinate
  localparam int unsigned TASK_W   = 2;    // task_id 0..3
  localparam int unsigned CH_W     = 7;    // ch_id 0..127
  localparam int unsigned MAX_LEN  = 256;  // payload words per packet (4 kB)
  localparam int unsigned LEN_W    = 9;    // holds 1..MAX_LEN
  localparam int unsigned N_VC     = 2;    // virtual channels per link
  localparam int unsigned CSUM_W   = 32;   // footer checksum
  localparam logic [31:0] IP_ID    = 32'hA9E1_0001;

  typedef logic [MAX_DIMS-1:0][COORD_W-1:0] coord_t;

  // Kind of a flit, carried beside the 128 data bits.
  typedef enum logic [1:0] {
    FK_HEAD = 2'd1,
    FK_DATA = 2'd2,
    FK_FOOT = 2'd3
  } flit_kind_e;

  // Header flit layout (128 bits).
  typedef struct packed {
    logic [FLIT_W-2*(MAX_DIMS*COORD_W+TASK_W+CH_W)-LEN_W-2:0] rsvd;
    logic              eom;       // last packet of a message
    logic [LEN_W-1:0]  len;       // payload words, 1..MAX_LEN
    coord_t            src_coord;
    logic [TASK_W-1:0] src_task;
    logic [CH_W-1:0]   src_ch;
    coord_t            dst_coord;
    logic [TASK_W-1:0] dst_task;
    logic [CH_W-1:0]   dst_ch;
  } header_t;

  // Footer flit layout (128 bits).
  typedef struct packed {
    logic [FLIT_W-CSUM_W-LEN_W-1:0] rsvd;
    logic [LEN_W-1:0]  len;
    logic [CSUM_W-1:0] csum;      // XOR of all 32-bit lanes of the payload
  } footer_t;

  // One flit on a switch path or an inter-node link.
  typedef struct packed {
    flit_kind_e        kind;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // Inter-node link word: a flit tagged with its virtual channel.
  typedef struct packed {
    logic  valid;
    logic  vc;
    flit_t flit;
  } link_t;

  // Destination of an outgoing message, carried in the AXI4-Stream TUSER
  // side channel of a task output channel.
  typedef struct packed {
    coord_t            coord;
    logic [TASK_W-1:0] task_id;
    logic [CH_W-1:0]   ch;
  } dest_t;

  localparam int unsigned DEST_W = $bits(dest_t);

  // Fold a payload word into the running footer checksum.
  function automatic logic [CSUM_W-1:0] csum_step(logic [CSUM_W-1:0] acc,
                                                  logic [FLIT_W-1:0] w);
    logic [CSUM_W-1:0] r;
    r = acc;
    for (int i = 0; i < FLIT_W / CSUM_W; i++) r ^= w[i*CSUM_W +: CSUM_W];
    return r;
  endfunction

endpackage
