// Shared types and constants of the NetCOPE interconnection system.
//
// Three buses share this package. The internal bus and the control bus are
// packet streams: a word moves when the sender's src_rdy and the receiver's
// dst_rdy are both high, sop marks the first word (the header) and eop the
// last. The control bus is 16 bits wide and carries the endpoint
// identification in header bits [3:0]; that field position is this design's
// choice, the sixteen-endpoint limit is the bus's own. The local bus is a
// 16-bit address/data link with ADS, WR, RD strobes going down and DRD, RDY
// coming back. All signals are active high in this implementation.
// The message types follow the packet reception and transmission examples
// of the platform; their numbers and field order are this design's own.
package nc_pkg;

  // control bus
  localparam int unsigned CB_DW  = 16;   // link width
  localparam int unsigned CB_NQ  = 16;   // endpoints / queues per direction
  localparam int unsigned CB_IDW = 4;    // width of the identification field

  typedef logic [CB_IDW-1:0] cb_id_t;

  typedef struct packed {
    logic [CB_DW-1:0] data;
    logic             sop;
    logic             eop;
  } cb_word_t;

  // control bus messages between the DMA processor and the packet buffers:
  // header bits [15:12] = message type, [3:0] = endpoint identification,
  // followed by 16-bit parameter words (this design's encoding)
  typedef enum logic [3:0] {
    MSG_NEW_PKT  = 4'd1,   // buffer -> DMA: offset, length, flags
    MSG_SEND_PKT = 4'd2,   // DMA -> buffer: RX: offset, address high, address low, length
                           //                TX: offset, length, flags
    MSG_ACK      = 4'd3,   // buffer -> DMA: offset of the packet just handled
    MSG_RELEASE  = 4'd4    // DMA -> RX buffer: length of the oldest packet to free
  } cb_msg_t;

  // local bus
  localparam int unsigned LB_DW = 16;

  typedef struct packed {
    logic [LB_DW-1:0] dwr;   // address halves (with ads) or write data (with wr)
    logic             ads;   // address strobe
    logic             wr;    // write strobe, one per data word
    logic             rd;    // read strobe, one per requested word
  } lb_dn_t;

  typedef struct packed {
    logic [LB_DW-1:0] drd;   // read data
    logic             rdy;   // acknowledge of a written word / valid read word
  } lb_up_t;

  localparam lb_dn_t LB_DN_IDLE = '0;
  localparam lb_up_t LB_UP_IDLE = '0;

endpackage
