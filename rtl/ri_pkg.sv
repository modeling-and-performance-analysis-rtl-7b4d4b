// ri_pkg: types and constants shared by every block of the slotted ring interconnect.
//
// A ring is a closed chain of registers ("slots"); each clock cycle every slot moves one
// position downstream, so the number of data packets on a ring is constant (one per node
// output register plus one per optional pipe stage). Every slot carries one pkt_t. The field
// set and the command / alert encodings follow the packet definition of the ring protocol;
// field widths are this implementation's choice where the protocol leaves them configurable.
//
// Field use that is this design's own choice:
//  * burst_size of a completion packet carries the number of completions still to come for
//    its read request, including this one, so "1" marks the last completion of a burst.
//  * cpl_order is a position in the initiator's completion buffer, which is 2**CO_W entries
//    deep, so target-side increments wrap exactly like the buffer index.
//  * ord_id is a ticket modulo 2**ORD_W; ORD_W is chosen so that the ticket space is larger
//    than the packets that can be outstanding at one reorder buffer.
package ri_pkg;

  localparam int ID_W   = 4;   // node IDs 0..15 (the IPU topology uses 0..9)
  localparam int DATA_W = 32;  // data word
  localparam int ADDR_W = 32;  // byte/word address, device defined
  localparam int ORD_W  = 6;   // command order ID (reorder ticket)
  localparam int CO_W   = 4;   // completion order ID = completion buffer index
  localparam int BS_W   = 4;   // burst size field, 1..MBS
  localparam int MBS    = 8;   // maximum burst size of a single-request-multiple-data read
  localparam int CNT_W  = 8;   // reservation counters

  typedef logic [ID_W-1:0] id_t;

  typedef enum logic [2:0] {
    CMD_WRITE     = 3'd0,
    CMD_READ      = 3'd1,
    CMD_COMPL     = 3'd2,
    CMD_RSV_COMPL = 3'd3,  // slot reserved so a target can return completions
    CMD_INIT      = 3'd4,  // ID assignment after power-on
    CMD_CLEAR     = 3'd5   // ask a node to unreserve a reserved-for-completion slot
  } cmd_e;

  typedef enum logic [2:0] {
    AL_NONE      = 3'd0,
    AL_NO_DST    = 3'd1,  // destination ID does not exist
    AL_ADDR      = 3'd2,  // address outside the destination's range
    AL_UNREQ_CPL = 3'd3,  // completion that was never requested
    AL_CPL_AT_TGT= 3'd4,  // storage node received a completion
    AL_REQ_AT_INI= 3'd5   // computational node received a read or write
  } alert_e;

  typedef struct packed {
    logic              valid;
    cmd_e              cmd;
    id_t               src;
    id_t               dst;
    logic [DATA_W-1:0] data;
    logic [ADDR_W-1:0] addr;
    logic [ORD_W-1:0]  ord_id;
    logic              ord_valid;
    logic              burst;
    logic [BS_W-1:0]   burst_size;
    logic [CO_W-1:0]   cpl_order;
    id_t               rsv_node;
    logic              reserved;
    logic              booked;
    alert_e            alert;
  } pkt_t;

  localparam pkt_t PKT_IDLE = '{valid: 1'b0, cmd: CMD_WRITE, alert: AL_NONE, default: '0};

  // Kinds of incoming port
  typedef enum logic [1:0] {
    PORT_INITIATOR  = 2'd0,  // FIFO, bounce without re-ordering
    PORT_TARGET     = 2'd1,  // ROB, bounce with re-ordering
    PORT_SUPERVISOR = 2'd2   // ROB, removes alerts and packets for absent nodes
  } port_kind_e;

endpackage
