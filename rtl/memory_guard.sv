// memory_guard: AXI4-Lite access filter placed between the processing system
// and a memory-mapped region (here a shared BRAM).
//
// The address window is split into NUM_SEG segments, each given by a base
// byte address and a size. Every segment carries a read-permission mask and
// a write-permission mask with one bit per CPU core. The core that issued an
// access is read from the AXI user side band of the address channel
// (aw_user / ar_user). An access is allowed when its address falls in a
// segment whose mask has the issuing core's bit set; it is then forwarded
// unchanged on the manager port and the downstream response is returned.
// An access that hits no segment, or lacks permission, is a violation:
//   - with HONEYPOT_EN, it is served by a small private honeypot RAM (writes
//     are stored there, reads return honeypot contents) and answered OKAY,
//     so it seems to have succeeded but never reaches the protected memory;
//   - without it, it is answered SLVERR (reads return zero).
// Each violation pulses violation_o for one clock and records the address,
// core and direction in viol_addr_o / viol_core_o / viol_write_o.
//
// Timing: one transfer at a time. The subordinate side takes a write when
// address and data are both valid, or else a read, in the IDLE state. A
// local (honeypot or error) response follows one clock later; a forwarded
// one adds the downstream transfer time.
//
// From the design description: segments defined at build time, read/write
// permission per segment and per originating core, detection of the core
// from AXI side-channel signals, and the optional honeypot region to which
// failing accesses are diverted so they appear to succeed. The user-field
// encoding, the SLVERR answer without honeypot, the honeypot size and the
// violation report are choices of this implementation. The default segment
// map (mailbox word, then payload; core 0 reads and writes both, core 1 may
// only read) is an example; stl_link sets its own.
module memory_guard
  import stl_pkg::*;
#(
  parameter int unsigned NUM_SEG     = 2,
  parameter int unsigned NUM_CORES   = 4,
  parameter addr_t       SEG_BASE [NUM_SEG] = '{32'h0000_0000, 32'h0000_0004},
  parameter addr_t       SEG_SIZE [NUM_SEG] = '{32'h0000_0004, 32'h0000_0ffc},
  parameter logic [NUM_CORES-1:0] SEG_RD [NUM_SEG] = '{4'b0011, 4'b0011},
  parameter logic [NUM_CORES-1:0] SEG_WR [NUM_SEG] = '{4'b0001, 4'b0001},
  parameter bit          HONEYPOT_EN = 1'b1,
  parameter int unsigned HP_WORDS    = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  // from the processing system
  input  axil_req_t s_req,
  output axil_rsp_t s_rsp,
  // to the protected memory
  output axil_req_t m_req,
  input  axil_rsp_t m_rsp,
  // violation report
  output logic      violation_o,
  output addr_t     viol_addr_o,
  output user_t     viol_core_o,
  output logic      viol_write_o
);

  localparam int unsigned HP_AW = (HP_WORDS > 1) ? $clog2(HP_WORDS) : 1;

  typedef enum logic [2:0] {
    G_IDLE, G_FWD_W, G_FWD_B, G_FWD_AR, G_FWD_R, G_LOC_B, G_LOC_R
  } gstate_e;

  gstate_e st_q;
  addr_t   addr_q;
  user_t   user_q;
  data_t   wdata_q;
  strb_t   strb_q;
  logic    aw_done_q, w_done_q;
  data_t   hp_rdata_q;
  data_t   hp_mem [HP_WORDS];

  // Permission lookup.
  function automatic logic allowed(input addr_t a, input user_t core, input logic wr);
    logic ok;
    ok = 1'b0;
    for (int i = 0; i < NUM_SEG; i++) begin
      if (a >= SEG_BASE[i] && (a - SEG_BASE[i]) < SEG_SIZE[i]) begin
        if (wr ? SEG_WR[i][core] : SEG_RD[i][core]) ok = 1'b1;
      end
    end
    return ok;
  endfunction

  logic take_w, take_r, w_ok, r_ok;
  assign take_w = (st_q == G_IDLE) && s_req.aw_valid && s_req.w_valid;
  assign take_r = (st_q == G_IDLE) && !take_w && s_req.ar_valid;
  assign w_ok   = allowed(s_req.aw_addr, s_req.aw_user, 1'b1);
  assign r_ok   = allowed(s_req.ar_addr, s_req.ar_user, 1'b0);

  logic [HP_AW-1:0] hp_idx;
  assign hp_idx = take_w ? s_req.aw_addr[HP_AW+1:2] : s_req.ar_addr[HP_AW+1:2];

  // Subordinate-side responses and manager-side requests.
  always_comb begin
    s_rsp          = '0;
    s_rsp.aw_ready = take_w;
    s_rsp.w_ready  = take_w;
    s_rsp.ar_ready = take_r;

    m_req          = '0;
    m_req.aw_addr  = addr_q;
    m_req.aw_user  = user_q;
    m_req.w_data   = wdata_q;
    m_req.w_strb   = strb_q;
    m_req.ar_addr  = addr_q;
    m_req.ar_user  = user_q;

    case (st_q)
      G_FWD_W: begin
        m_req.aw_valid = !aw_done_q;
        m_req.w_valid  = !w_done_q;
      end
      G_FWD_B: begin
        m_req.b_ready  = s_req.b_ready;
        s_rsp.b_valid  = m_rsp.b_valid;
        s_rsp.b_resp   = m_rsp.b_resp;
      end
      G_FWD_AR: m_req.ar_valid = 1'b1;
      G_FWD_R: begin
        m_req.r_ready  = s_req.r_ready;
        s_rsp.r_valid  = m_rsp.r_valid;
        s_rsp.r_data   = m_rsp.r_data;
        s_rsp.r_resp   = m_rsp.r_resp;
      end
      G_LOC_B: begin
        s_rsp.b_valid  = 1'b1;
        s_rsp.b_resp   = HONEYPOT_EN ? RESP_OKAY : RESP_SLVERR;
      end
      G_LOC_R: begin
        s_rsp.r_valid  = 1'b1;
        s_rsp.r_data   = HONEYPOT_EN ? hp_rdata_q : '0;
        s_rsp.r_resp   = HONEYPOT_EN ? RESP_OKAY : RESP_SLVERR;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q         <= G_IDLE;
      addr_q       <= '0;
      user_q       <= '0;
      wdata_q      <= '0;
      strb_q       <= '0;
      aw_done_q    <= 1'b0;
      w_done_q     <= 1'b0;
      hp_rdata_q   <= '0;
      violation_o  <= 1'b0;
      viol_addr_o  <= '0;
      viol_core_o  <= '0;
      viol_write_o <= 1'b0;
    end else begin
      violation_o <= 1'b0;
      case (st_q)
        G_IDLE: begin
          if (take_w) begin
            addr_q    <= s_req.aw_addr;
            user_q    <= s_req.aw_user;
            wdata_q   <= s_req.w_data;
            strb_q    <= s_req.w_strb;
            aw_done_q <= 1'b0;
            w_done_q  <= 1'b0;
            st_q      <= w_ok ? G_FWD_W : G_LOC_B;
          end else if (take_r) begin
            addr_q    <= s_req.ar_addr;
            user_q    <= s_req.ar_user;
            st_q      <= r_ok ? G_FWD_AR : G_LOC_R;
            if (!r_ok) hp_rdata_q <= hp_mem[hp_idx];
          end
          if ((take_w && !w_ok) || (take_r && !r_ok)) begin
            violation_o  <= 1'b1;
            viol_addr_o  <= take_w ? s_req.aw_addr : s_req.ar_addr;
            viol_core_o  <= take_w ? s_req.aw_user : s_req.ar_user;
            viol_write_o <= take_w;
          end
        end
        G_FWD_W: begin
          if (m_rsp.aw_ready) aw_done_q <= 1'b1;
          if (m_rsp.w_ready)  w_done_q  <= 1'b1;
          if ((aw_done_q || m_rsp.aw_ready) && (w_done_q || m_rsp.w_ready)) st_q <= G_FWD_B;
        end
        G_FWD_B:  if (m_rsp.b_valid && s_req.b_ready) st_q <= G_IDLE;
        G_FWD_AR: if (m_rsp.ar_ready) st_q <= G_FWD_R;
        G_FWD_R:  if (m_rsp.r_valid && s_req.r_ready) st_q <= G_IDLE;
        G_LOC_B:  if (s_req.b_ready) st_q <= G_IDLE;
        G_LOC_R:  if (s_req.r_ready) st_q <= G_IDLE;
        default:  st_q <= G_IDLE;
      endcase
    end
  end

  // Honeypot RAM: takes denied writes, serves denied reads. It is cleared
  // by reset so that no earlier contents can be read through it.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < HP_WORDS; j++) hp_mem[j] <= '0;
    end else if (HONEYPOT_EN && take_w && !w_ok) begin
      for (int i = 0; i < 4; i++)
        if (s_req.w_strb[i]) hp_mem[hp_idx][8*i +: 8] <= s_req.w_data[8*i +: 8];
    end
  end

endmodule
