// axil_mem_port: AXI4-Lite subordinate that turns bus transfers into
// single-cycle accesses of a synchronous RAM port.
//
// One transfer is in flight at a time. In IDLE a write is taken when both its
// address and data are valid (aw_ready and w_ready rise together), the RAM is
// written in that clock and the B response follows in the next. Otherwise a
// pending read is taken, the RAM is read in that clock and its registered
// output is returned on R in the next. Writes win over reads that arrive in
// the same clock. Every response is OKAY; address bits above the RAM size
// are ignored, so the RAM repeats through the address space.
//
// RAM port timing: mem_en with mem_we writes mem_wdata under mem_be; mem_en
// without mem_we reads, and mem_rdata is valid from the next clock until the
// next read.
//
// The assertions state the AXI rule that a manager holds VALID and its
// payload until READY. The block itself is this implementation's glue: the
// design description only says the BRAMs sit on AXI memory-mapped ports.
module axil_mem_port
  import stl_pkg::*;
#(
  parameter int unsigned WORD_AW = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  axil_req_t          req,
  output axil_rsp_t          rsp,
  output logic               mem_en,
  output logic               mem_we,
  output strb_t              mem_be,
  output logic [WORD_AW-1:0] mem_addr,
  output data_t              mem_wdata,
  input  data_t              mem_rdata
);

  typedef enum logic [1:0] {P_IDLE, P_BRESP, P_RRESP} pstate_e;
  pstate_e st_q;

  logic take_w, take_r;
  assign take_w = (st_q == P_IDLE) && req.aw_valid && req.w_valid;
  assign take_r = (st_q == P_IDLE) && !take_w && req.ar_valid;

  always_comb begin
    rsp          = '0;
    rsp.aw_ready = take_w;
    rsp.w_ready  = take_w;
    rsp.ar_ready = take_r;
    rsp.b_valid  = (st_q == P_BRESP);
    rsp.b_resp   = RESP_OKAY;
    rsp.r_valid  = (st_q == P_RRESP);
    rsp.r_data   = mem_rdata;
    rsp.r_resp   = RESP_OKAY;
  end

  assign mem_en    = take_w || take_r;
  assign mem_we    = take_w;
  assign mem_be    = req.w_strb;
  assign mem_addr  = take_w ? req.aw_addr[WORD_AW+1:2] : req.ar_addr[WORD_AW+1:2];
  assign mem_wdata = req.w_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= P_IDLE;
    end else begin
      case (st_q)
        P_IDLE:  if (take_w) st_q <= P_BRESP; else if (take_r) st_q <= P_RRESP;
        P_BRESP: if (req.b_ready) st_q <= P_IDLE;
        P_RRESP: if (req.r_ready) st_q <= P_IDLE;
        default: st_q <= P_IDLE;
      endcase
    end
  end

  // Manager side of the handshake: VALID is held until READY.
  a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n)
    req.aw_valid && !rsp.aw_ready |=> req.aw_valid);
  a_w_hold: assert property (@(posedge clk) disable iff (!rst_n)
    req.w_valid && !rsp.w_ready |=> req.w_valid);
  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n)
    req.ar_valid && !rsp.ar_ready |=> req.ar_valid && $stable(req.ar_addr));

endmodule
