// axil_single_master: AXI4-Lite manager that performs one command at a time.
//
// A command (cmd_write, cmd_addr, cmd_wdata) is taken when cmd_valid is high
// and the block is idle (cmd_ready). A write drives AW and W together and
// lowers each VALID once its READY has been seen, then waits for B. A read
// drives AR, then waits for R. cmd_done pulses for one clock when the
// response arrives; for a read, rdata holds the data from then until the
// next read completes, and resp holds the response code. The command's user
// field (core number) is driven as USER on every transfer. Writes always use
// all four byte strobes.
//
// This is glue of this implementation: it gives the Data Validator its two
// AXI memory-mapped manager ports, which the design description names
// without detailing.
module axil_single_master
  import stl_pkg::*;
#(
  parameter user_t USER = '0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      cmd_valid,
  output logic      cmd_ready,
  input  logic      cmd_write,
  input  addr_t     cmd_addr,
  input  data_t     cmd_wdata,
  output logic      cmd_done,
  output data_t     rdata,
  output axi_resp_e resp,
  output axil_req_t m_req,
  input  axil_rsp_t m_rsp
);

  typedef enum logic [2:0] {M_IDLE, M_AW, M_B, M_AR, M_R} mstate_e;
  mstate_e st_q;
  addr_t   addr_q;
  data_t   wdata_q;
  logic    aw_done_q, w_done_q;

  assign cmd_ready = (st_q == M_IDLE);

  always_comb begin
    m_req          = '0;
    m_req.aw_addr  = addr_q;
    m_req.aw_user  = USER;
    m_req.w_data   = wdata_q;
    m_req.w_strb   = '1;
    m_req.ar_addr  = addr_q;
    m_req.ar_user  = USER;
    m_req.aw_valid = (st_q == M_AW) && !aw_done_q;
    m_req.w_valid  = (st_q == M_AW) && !w_done_q;
    m_req.b_ready  = (st_q == M_B);
    m_req.ar_valid = (st_q == M_AR);
    m_req.r_ready  = (st_q == M_R);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= M_IDLE;
      addr_q    <= '0;
      wdata_q   <= '0;
      aw_done_q <= 1'b0;
      w_done_q  <= 1'b0;
      cmd_done  <= 1'b0;
      rdata     <= '0;
      resp      <= RESP_OKAY;
    end else begin
      cmd_done <= 1'b0;
      case (st_q)
        M_IDLE: if (cmd_valid) begin
          addr_q    <= cmd_addr;
          wdata_q   <= cmd_wdata;
          aw_done_q <= 1'b0;
          w_done_q  <= 1'b0;
          st_q      <= cmd_write ? M_AW : M_AR;
        end
        M_AW: begin
          if (m_rsp.aw_ready) aw_done_q <= 1'b1;
          if (m_rsp.w_ready)  w_done_q  <= 1'b1;
          if ((aw_done_q || m_rsp.aw_ready) && (w_done_q || m_rsp.w_ready)) st_q <= M_B;
        end
        M_B: if (m_rsp.b_valid) begin
          resp     <= m_rsp.b_resp;
          cmd_done <= 1'b1;
          st_q     <= M_IDLE;
        end
        M_AR: if (m_rsp.ar_ready) st_q <= M_R;
        M_R: if (m_rsp.r_valid) begin
          rdata    <= m_rsp.r_data;
          resp     <= m_rsp.r_resp;
          cmd_done <= 1'b1;
          st_q     <= M_IDLE;
        end
        default: st_q <= M_IDLE;
      endcase
    end
  end

endmodule
