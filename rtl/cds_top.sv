// cds_top: programmable-logic side of two cross-domain transfer paths
// between two virtual machines, VM0 and VM1, each pinned to its own CPU core.
//
// 1. Secure Transfer Link (STL), in the fabric clock domain (clk):
//    two one-way links in opposite directions, each
//      Memory Guard -> origin BRAM -> Data Validator -> destination BRAM
//      <- Memory Guard
//    link 0 carries VM0 -> VM1, link 1 carries VM1 -> VM0. The four
//    AXI4-Lite ports are the processing-system side of the four Memory
//    Guards; how the processing system's AXI master reaches them (its
//    interconnect and address map) is outside this block.
// 2. Fixed link, in the GMII clock domain (gmii_clk): the GMII of the two
//    Ethernet MACs are wired to each other through one packet_validator per
//    direction: MAC 0 transmit -> filter 0 -> MAC 1 receive, MAC 1 transmit
//    -> filter 1 -> MAC 0 receive.
// Each link and each filter has its own validation/passthrough mode input,
// so every combination of the measured configurations can be set.
//
// The two paths share nothing but the top level. Timing and protocol of
// every port are those of the blocks they come from (see stl_link,
// data_validator, memory_guard, packet_validator).
//
// From the design description: the two mechanisms, the link structure of
// each STL direction, the two opposite-direction links and the fixed link
// between the two MACs. The port grouping, the core numbers (VM0 on core 0,
// VM1 on core 1) and the separate GMII clock are choices of this
// implementation.
module cds_top
  import stl_pkg::*;
#(
  parameter int unsigned BRAM_BYTES  = 4096,
  parameter int unsigned MAX_DEPTH   = 16,
  parameter int unsigned FRAME_BYTES = 2048,
  parameter int unsigned VM0_CORE    = 0,
  parameter int unsigned VM1_CORE    = 1,
  parameter bit          HONEYPOT_EN = 1'b1
) (
  // ---------------- Secure Transfer Link (fabric clock)
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic      [1:0]      stl_enable,       // [0]: VM0->VM1, [1]: VM1->VM0
  input  dv_mode_e  [1:0]      stl_mode,
  input  axil_req_t            vm0_tx_req,       // VM0 writes link 0 origin
  output axil_rsp_t            vm0_tx_rsp,
  input  axil_req_t            vm1_rx_req,       // VM1 reads link 0 destination
  output axil_rsp_t            vm1_rx_rsp,
  input  axil_req_t            vm1_tx_req,       // VM1 writes link 1 origin
  output axil_rsp_t            vm1_tx_rsp,
  input  axil_req_t            vm0_rx_req,       // VM0 reads link 1 destination
  output axil_rsp_t            vm0_rx_rsp,
  output logic      [1:0]      stl_drop_irq,
  input  logic      [1:0]      stl_drop_ack,
  output logic      [1:0]      stl_tx_violation,
  output logic      [1:0]      stl_rx_violation,
  output logic      [1:0][15:0] stl_passed_cnt,
  output logic      [1:0][15:0] stl_dropped_cnt,
  // ---------------- fixed link (GMII clock)
  input  logic                 gmii_clk,
  input  logic                 gmii_rst_n,
  input  dv_mode_e  [1:0]      fix_mode,         // [0]: MAC0->MAC1, [1]: MAC1->MAC0
  input  logic                 mac0_tx_en,       // MAC 0 transmit GMII
  input  logic                 mac0_tx_er,
  input  logic      [7:0]      mac0_txd,
  output logic                 mac0_rx_dv,       // MAC 0 receive GMII
  output logic                 mac0_rx_er,
  output logic      [7:0]      mac0_rxd,
  input  logic                 mac1_tx_en,
  input  logic                 mac1_tx_er,
  input  logic      [7:0]      mac1_txd,
  output logic                 mac1_rx_dv,
  output logic                 mac1_rx_er,
  output logic      [7:0]      mac1_rxd,
  output dv_mode_e  [1:0]      fix_mode_active,
  output logic      [1:0][15:0] fix_passed_cnt,
  output logic      [1:0][15:0] fix_dropped_cnt,
  output logic      [1:0][15:0] fix_overflow_cnt
);

  // ---------------- Secure Transfer Link
  stl_link #(
    .BRAM_BYTES(BRAM_BYTES), .MAX_DEPTH(MAX_DEPTH),
    .SENDER_CORE(VM0_CORE), .RECEIVER_CORE(VM1_CORE), .HONEYPOT_EN(HONEYPOT_EN)
  ) u_link_0to1 (
    .clk, .rst_n, .enable(stl_enable[0]), .mode(stl_mode[0]),
    .tx_req(vm0_tx_req), .tx_rsp(vm0_tx_rsp), .rx_req(vm1_rx_req), .rx_rsp(vm1_rx_rsp),
    .drop_irq_o(stl_drop_irq[0]), .drop_ack_i(stl_drop_ack[0]),
    .tx_violation_o(stl_tx_violation[0]), .rx_violation_o(stl_rx_violation[0]),
    .passed_cnt_o(stl_passed_cnt[0]), .dropped_cnt_o(stl_dropped_cnt[0])
  );

  stl_link #(
    .BRAM_BYTES(BRAM_BYTES), .MAX_DEPTH(MAX_DEPTH),
    .SENDER_CORE(VM1_CORE), .RECEIVER_CORE(VM0_CORE), .HONEYPOT_EN(HONEYPOT_EN)
  ) u_link_1to0 (
    .clk, .rst_n, .enable(stl_enable[1]), .mode(stl_mode[1]),
    .tx_req(vm1_tx_req), .tx_rsp(vm1_tx_rsp), .rx_req(vm0_rx_req), .rx_rsp(vm0_rx_rsp),
    .drop_irq_o(stl_drop_irq[1]), .drop_ack_i(stl_drop_ack[1]),
    .tx_violation_o(stl_tx_violation[1]), .rx_violation_o(stl_rx_violation[1]),
    .passed_cnt_o(stl_passed_cnt[1]), .dropped_cnt_o(stl_dropped_cnt[1])
  );

  // ---------------- fixed link
  packet_validator #(.FRAME_BYTES(FRAME_BYTES), .MAX_DEPTH(MAX_DEPTH)) u_fix_0to1 (
    .clk(gmii_clk), .rst_n(gmii_rst_n), .mode(fix_mode[0]),
    .rx_dv(mac0_tx_en), .rx_er(mac0_tx_er), .rxd(mac0_txd),
    .tx_en(mac1_rx_dv), .tx_er(mac1_rx_er), .txd(mac1_rxd),
    .mode_o(fix_mode_active[0]), .passed_cnt_o(fix_passed_cnt[0]),
    .dropped_cnt_o(fix_dropped_cnt[0]), .overflow_cnt_o(fix_overflow_cnt[0])
  );

  packet_validator #(.FRAME_BYTES(FRAME_BYTES), .MAX_DEPTH(MAX_DEPTH)) u_fix_1to0 (
    .clk(gmii_clk), .rst_n(gmii_rst_n), .mode(fix_mode[1]),
    .rx_dv(mac1_tx_en), .rx_er(mac1_tx_er), .rxd(mac1_txd),
    .tx_en(mac0_rx_dv), .tx_er(mac0_rx_er), .txd(mac0_rxd),
    .mode_o(fix_mode_active[1]), .passed_cnt_o(fix_passed_cnt[1]),
    .dropped_cnt_o(fix_dropped_cnt[1]), .overflow_cnt_o(fix_overflow_cnt[1])
  );

endmodule
