// data_validator: moves one message at a time from an origin BRAM to a
// destination BRAM, checking it against the JSON grammar on the way.
//
// Protocol (both BRAMs, word 0 is the mailbox, see stl_pkg):
//   1. The sender writes the message from byte address 4 on, then writes the
//      origin mailbox with FULL set and the byte length.
//   2. The validator polls the origin mailbox over its origin AXI port until
//      FULL, then polls the destination mailbox until it is empty (the
//      receiver has taken the previous message).
//   3. Word by word it reads the payload from the origin BRAM, in validation
//      mode feeds its bytes to the JSON push-down automaton (one per clock),
//      and writes the word to the same place in the destination BRAM.
//   4. If the automaton flags an error after any word, or the message ends
//      without forming one complete JSON value, or the length is zero or
//      larger than the BRAM, the message is dropped: the payload words
//      already written to the destination and the whole payload in the
//      origin are overwritten with zero, the origin mailbox is released,
//      drop_irq_o is raised and stays high until drop_ack_i.
//   5. Otherwise the destination mailbox is written with FULL and the length,
//      and the origin mailbox is cleared so the sender may send again.
// In passthrough mode step 3 skips the automaton and every message with a
// legal length is delivered. The mode is sampled at the start of a message.
// Nothing starts while enable is low; software raises it once both
// mailboxes hold a defined value (BRAM contents are not reset).
//
// Timing: every BRAM access is one AXI4-Lite transfer, one at a time. With
// the stl_bram ports a payload word costs a 4-clock read, 1 to 4 clocks of
// automaton feeding (validation only) and a 4-clock write.
//
// From the design description: two 32-bit AXI memory-mapped ports each tied
// to a BRAM, validation and passthrough modes, drop-and-clear on a failed
// check, mailbox bits for synchronisation and a drop status usable as an
// interrupt. The mailbox layout, the word-by-word schedule, the length check
// and the counters are choices of this implementation.
module data_validator
  import stl_pkg::*;
#(
  parameter int unsigned BRAM_BYTES = 4096,
  parameter int unsigned MAX_DEPTH  = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      enable,
  input  dv_mode_e  mode,
  output axil_req_t o_req,   // origin BRAM
  input  axil_rsp_t o_rsp,
  output axil_req_t d_req,   // destination BRAM
  input  axil_rsp_t d_rsp,
  output logic      drop_irq_o,
  input  logic      drop_ack_i,
  output logic      busy_o,
  output logic [15:0] passed_cnt_o,
  output logic [15:0] dropped_cnt_o
);

  localparam int unsigned CAP_BYTES = BRAM_BYTES - 4;

  typedef enum logic [3:0] {
    D_POLL_O, D_POLL_D, D_RD, D_FEED, D_WR, D_MBOX_D, D_MBOX_O,
    D_CLR_D, D_CLR_O, D_REL_O
  } dstate_e;

  dstate_e   st_q;
  logic      issued_q;
  logic [15:0] len_q, nwords_q, idx_q, clr_q, clr_n_q;
  logic [1:0]  bcnt_q;
  data_t     word_q;
  dv_mode_e  mode_q;

  // Two single-command AXI managers.
  logic  o_cmd_valid, o_cmd_ready, o_cmd_write, o_done;
  logic  d_cmd_valid, d_cmd_ready, d_cmd_write, d_done;
  addr_t o_addr, d_addr;
  data_t o_wdata, d_wdata, o_rdata, d_rdata;
  axi_resp_e o_resp, d_resp;

  axil_single_master u_o_port (
    .clk, .rst_n, .cmd_valid(o_cmd_valid), .cmd_ready(o_cmd_ready), .cmd_write(o_cmd_write),
    .cmd_addr(o_addr), .cmd_wdata(o_wdata), .cmd_done(o_done), .rdata(o_rdata), .resp(o_resp),
    .m_req(o_req), .m_rsp(o_rsp)
  );

  axil_single_master u_d_port (
    .clk, .rst_n, .cmd_valid(d_cmd_valid), .cmd_ready(d_cmd_ready), .cmd_write(d_cmd_write),
    .cmd_addr(d_addr), .cmd_wdata(d_wdata), .cmd_done(d_done), .rdata(d_rdata), .resp(d_resp),
    .m_req(d_req), .m_rsp(d_rsp)
  );

  // JSON push-down automaton.
  logic pda_clear, pda_valid, pda_error, pda_accept, pda_ovf;
  logic [7:0] pda_byte;
  logic [$clog2(MAX_DEPTH+1)-1:0] pda_depth;

  json_pda #(.MAX_DEPTH(MAX_DEPTH)) u_pda (
    .clk, .rst_n, .clear(pda_clear), .in_valid(pda_valid), .in_data(pda_byte),
    .error_o(pda_error), .accept_o(pda_accept), .overflow_o(pda_ovf), .depth_o(pda_depth)
  );

  function automatic addr_t payload_addr(input logic [15:0] w);
    return addr_t'(4) + (addr_t'(w) << 2);
  endfunction

  // Which port a state uses and what it asks for.
  logic uses_o, uses_d, is_write;
  addr_t acc_addr;
  data_t acc_wdata;

  always_comb begin
    uses_o    = 1'b0;
    uses_d    = 1'b0;
    is_write  = 1'b0;
    acc_addr  = '0;
    acc_wdata = '0;
    case (st_q)
      D_POLL_O: begin uses_o = enable; end
      D_POLL_D: begin uses_d = 1'b1; end
      D_RD:     begin uses_o = 1'b1; acc_addr = payload_addr(idx_q); end
      D_WR:     begin uses_d = 1'b1; is_write = 1'b1; acc_addr = payload_addr(idx_q); acc_wdata = word_q; end
      D_MBOX_D: begin
        uses_d = 1'b1; is_write = 1'b1;
        acc_wdata = data_t'(len_q);
        acc_wdata[MBOX_FULL_BIT] = 1'b1;
      end
      D_MBOX_O: begin uses_o = 1'b1; is_write = 1'b1; end
      D_CLR_D:  begin uses_d = (clr_q < clr_n_q); is_write = 1'b1; acc_addr = payload_addr(clr_q); end
      D_CLR_O:  begin uses_o = (clr_q < nwords_q); is_write = 1'b1; acc_addr = payload_addr(clr_q); end
      D_REL_O:  begin uses_o = 1'b1; is_write = 1'b1; end
      default: ;
    endcase
  end

  assign o_cmd_valid = uses_o && !issued_q && o_cmd_ready;
  assign d_cmd_valid = uses_d && !issued_q && d_cmd_ready;
  assign o_cmd_write = is_write;
  assign d_cmd_write = is_write;
  assign o_addr      = acc_addr;
  assign d_addr      = acc_addr;
  assign o_wdata     = acc_wdata;
  assign d_wdata     = acc_wdata;

  logic done;
  assign done = o_done || d_done;

  // Automaton feed.
  logic [1:0] last_b;
  always_comb begin
    logic [15:0] left;
    left   = len_q - (idx_q << 2);
    last_b = (left >= 16'd4) ? 2'd3 : 2'(left - 16'd1);
  end
  assign pda_valid = (st_q == D_FEED);
  assign pda_byte  = word_q[8*bcnt_q +: 8];
  assign pda_clear = (st_q == D_POLL_D) && done && !d_rdata[MBOX_FULL_BIT];

  assign busy_o = (st_q != D_POLL_O);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q          <= D_POLL_O;
      issued_q      <= 1'b0;
      len_q         <= '0;
      nwords_q      <= '0;
      idx_q         <= '0;
      clr_q         <= '0;
      clr_n_q       <= '0;
      bcnt_q        <= '0;
      word_q        <= '0;
      mode_q        <= MODE_VALIDATE;
      drop_irq_o    <= 1'b0;
      passed_cnt_o  <= '0;
      dropped_cnt_o <= '0;
    end else begin
      if (o_cmd_valid || d_cmd_valid) issued_q <= 1'b1;
      if (done) issued_q <= 1'b0;
      if (drop_ack_i) drop_irq_o <= 1'b0;

      case (st_q)
        D_POLL_O: if (done) begin
          if (o_rdata[MBOX_FULL_BIT]) begin
            len_q    <= o_rdata[MBOX_LEN_W-1:0];
            nwords_q <= (o_rdata[MBOX_LEN_W-1:0] + 16'd3) >> 2;
            if (o_rdata[MBOX_LEN_W-1:0] == '0 || 32'(o_rdata[MBOX_LEN_W-1:0]) > CAP_BYTES)
              st_q <= D_REL_O;
            else
              st_q <= D_POLL_D;
          end
        end
        D_POLL_D: if (done && !d_rdata[MBOX_FULL_BIT]) begin
          idx_q  <= '0;
          mode_q <= mode;
          st_q   <= D_RD;
        end
        D_RD: if (done) begin
          word_q <= o_rdata;
          bcnt_q <= '0;
          st_q   <= (mode_q == MODE_VALIDATE) ? D_FEED : D_WR;
        end
        D_FEED: begin
          if (bcnt_q == last_b) st_q <= D_WR;
          else                  bcnt_q <= bcnt_q + 2'd1;
        end
        D_WR: if (done) begin
          if (mode_q == MODE_VALIDATE &&
              (pda_error || (idx_q + 16'd1 == nwords_q && !pda_accept))) begin
            clr_q   <= '0;
            clr_n_q <= idx_q + 16'd1;
            st_q    <= D_CLR_D;
          end else if (idx_q + 16'd1 == nwords_q) begin
            st_q <= D_MBOX_D;
          end else begin
            idx_q <= idx_q + 16'd1;
            st_q  <= D_RD;
          end
        end
        D_MBOX_D: if (done) st_q <= D_MBOX_O;
        D_MBOX_O: if (done) begin
          passed_cnt_o <= passed_cnt_o + 16'd1;
          st_q         <= D_POLL_O;
        end
        D_CLR_D: begin
          if (clr_q >= clr_n_q) begin
            clr_q <= '0;
            st_q  <= D_CLR_O;
          end else if (done) begin
            clr_q <= clr_q + 16'd1;
          end
        end
        D_CLR_O: begin
          if (clr_q >= nwords_q) st_q <= D_REL_O;
          else if (done)         clr_q <= clr_q + 16'd1;
        end
        D_REL_O: if (done) begin
          drop_irq_o    <= 1'b1;
          dropped_cnt_o <= dropped_cnt_o + 16'd1;
          st_q          <= D_POLL_O;
        end
        default: st_q <= D_POLL_O;
      endcase
    end
  end

endmodule
