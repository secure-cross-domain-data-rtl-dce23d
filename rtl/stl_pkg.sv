// stl_pkg: types and constants shared by the cross-domain transfer blocks.
//
// The memory-mapped buses of the Secure Transfer Link are 32-bit AXI4-Lite
// channels. They are carried as two packed structs, one per direction, so a
// port is a single signal: axil_req_t flows from manager to subordinate and
// axil_rsp_t back. The AXI user side band of the address channels (aw_user,
// ar_user) carries the number of the CPU core that issued the access; the
// Memory Guard decides on it. The 32-bit data width follows the design
// description; address width, user width and the mailbox layout are choices
// of this implementation.
//
// Mailbox layout (word 0 of every shared BRAM):
//   bit 31      FULL  - a message is present in the BRAM
//   bits 15:0   LEN   - message length in bytes
// The payload follows from byte address 4 on, little-endian within a word.
package stl_pkg;

  localparam int unsigned AXIL_DATA_W = 32;
  localparam int unsigned AXIL_ADDR_W = 32;
  localparam int unsigned AXIL_USER_W = 2;   // four A53 cores

  typedef logic [AXIL_ADDR_W-1:0]   addr_t;
  typedef logic [AXIL_DATA_W-1:0]   data_t;
  typedef logic [AXIL_DATA_W/8-1:0] strb_t;
  typedef logic [AXIL_USER_W-1:0]   user_t;

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axi_resp_e;

  // Manager -> subordinate.
  typedef struct packed {
    logic  aw_valid;
    addr_t aw_addr;
    user_t aw_user;
    logic  w_valid;
    data_t w_data;
    strb_t w_strb;
    logic  b_ready;
    logic  ar_valid;
    addr_t ar_addr;
    user_t ar_user;
    logic  r_ready;
  } axil_req_t;

  // Subordinate -> manager.
  typedef struct packed {
    logic      aw_ready;
    logic      w_ready;
    logic      b_valid;
    axi_resp_e b_resp;
    logic      ar_ready;
    logic      r_valid;
    data_t     r_data;
    axi_resp_e r_resp;
  } axil_rsp_t;

  localparam axil_req_t AXIL_REQ_IDLE = '0;

  // Mailbox word fields.
  localparam int unsigned MBOX_FULL_BIT = 31;
  localparam int unsigned MBOX_LEN_W    = 16;

  // Largest message the experiments carry (one UDP datagram payload).
  localparam int unsigned MAX_MSG_BYTES = 1472;

  // Data Validator modes.
  typedef enum logic {
    MODE_PASSTHROUGH = 1'b0,
    MODE_VALIDATE    = 1'b1
  } dv_mode_e;

endpackage
