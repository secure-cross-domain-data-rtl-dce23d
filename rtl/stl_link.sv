// stl_link: one direction of the Secure Transfer Link, a hardware data diode
// from a sending virtual machine to a receiving one.
//
//   sender PS port -> Memory Guard -> origin BRAM <- Data Validator
//                                                    -> destination BRAM
//   receiver PS port -> Memory Guard -> destination BRAM
//
// The sender writes a message and the mailbox into the origin BRAM, the Data
// Validator copies it (checking the JSON grammar in validation mode) into the
// destination BRAM, and the receiver reads it there. Each BRAM is reached
// from the processing system only through its Memory Guard, whose segment
// map is fixed here:
//   origin BRAM       mailbox word: sender reads/writes
//                     payload:      sender reads/writes
//   destination BRAM  mailbox word: receiver reads/writes (to empty it)
//                     payload:      receiver reads only
// Every other core, and every other access, is a violation and is diverted
// to the guard's honeypot (or answered SLVERR if HONEYPOT_EN is 0). The
// sender therefore cannot read what the receiver gets, and the receiver
// cannot write into the link: data moves one way only.
//
// Which core runs which VM is set by SENDER_CORE and RECEIVER_CORE; VMs are
// pinned to cores so a core number identifies a VM.
//
// From the design description: the BRAM / Data Validator / BRAM chain with
// a Memory Guard gating PS access to each BRAM, and the use of CPU pinning to
// tie permissions to VMs. The exact segment map is this implementation's.
module stl_link
  import stl_pkg::*;
#(
  parameter int unsigned BRAM_BYTES    = 4096,
  parameter int unsigned MAX_DEPTH     = 16,
  parameter int unsigned SENDER_CORE   = 0,
  parameter int unsigned RECEIVER_CORE = 1,
  parameter bit          HONEYPOT_EN   = 1'b1,
  parameter int unsigned HP_WORDS      = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  dv_mode_e    mode,
  input  axil_req_t   tx_req,      // sender VM
  output axil_rsp_t   tx_rsp,
  input  axil_req_t   rx_req,      // receiver VM
  output axil_rsp_t   rx_rsp,
  output logic        drop_irq_o,
  input  logic        drop_ack_i,
  output logic        tx_violation_o,
  output logic        rx_violation_o,
  output logic [15:0] passed_cnt_o,
  output logic [15:0] dropped_cnt_o
);

  localparam logic [3:0] SND = 4'(1 << SENDER_CORE);
  localparam logic [3:0] RCV = 4'(1 << RECEIVER_CORE);
  localparam addr_t      PAYLOAD_SIZE = addr_t'(BRAM_BYTES - 4);

  axil_req_t o_a_req, o_b_req, d_a_req, d_b_req;
  axil_rsp_t o_a_rsp, o_b_rsp, d_a_rsp, d_b_rsp;

  addr_t tx_viol_addr, rx_viol_addr;
  user_t tx_viol_core, rx_viol_core;
  logic  tx_viol_wr, rx_viol_wr;
  logic  dv_busy;

  memory_guard #(
    .NUM_SEG(2), .NUM_CORES(4),
    .SEG_BASE('{addr_t'(0), addr_t'(4)}), .SEG_SIZE('{addr_t'(4), PAYLOAD_SIZE}),
    .SEG_RD('{SND, SND}), .SEG_WR('{SND, SND}),
    .HONEYPOT_EN(HONEYPOT_EN), .HP_WORDS(HP_WORDS)
  ) u_mg_tx (
    .clk, .rst_n, .s_req(tx_req), .s_rsp(tx_rsp), .m_req(o_a_req), .m_rsp(o_a_rsp),
    .violation_o(tx_violation_o), .viol_addr_o(tx_viol_addr), .viol_core_o(tx_viol_core),
    .viol_write_o(tx_viol_wr)
  );

  stl_bram #(.BYTES(BRAM_BYTES)) u_origin (
    .clk, .rst_n, .a_req(o_a_req), .a_rsp(o_a_rsp), .b_req(o_b_req), .b_rsp(o_b_rsp)
  );

  data_validator #(.BRAM_BYTES(BRAM_BYTES), .MAX_DEPTH(MAX_DEPTH)) u_dv (
    .clk, .rst_n, .enable, .mode,
    .o_req(o_b_req), .o_rsp(o_b_rsp), .d_req(d_b_req), .d_rsp(d_b_rsp),
    .drop_irq_o, .drop_ack_i, .busy_o(dv_busy), .passed_cnt_o, .dropped_cnt_o
  );

  stl_bram #(.BYTES(BRAM_BYTES)) u_dest (
    .clk, .rst_n, .a_req(d_a_req), .a_rsp(d_a_rsp), .b_req(d_b_req), .b_rsp(d_b_rsp)
  );

  memory_guard #(
    .NUM_SEG(2), .NUM_CORES(4),
    .SEG_BASE('{addr_t'(0), addr_t'(4)}), .SEG_SIZE('{addr_t'(4), PAYLOAD_SIZE}),
    .SEG_RD('{RCV, RCV}), .SEG_WR('{RCV, 4'b0000}),
    .HONEYPOT_EN(HONEYPOT_EN), .HP_WORDS(HP_WORDS)
  ) u_mg_rx (
    .clk, .rst_n, .s_req(rx_req), .s_rsp(rx_rsp), .m_req(d_a_req), .m_rsp(d_a_rsp),
    .violation_o(rx_violation_o), .viol_addr_o(rx_viol_addr), .viol_core_o(rx_viol_core),
    .viol_write_o(rx_viol_wr)
  );

endmodule
