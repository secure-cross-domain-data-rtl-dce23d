// packet_validator: in-line filter for one direction of the fixed Ethernet
// link, placed on the GMII between two MACs.
//
// In validation mode the block stores each frame (preamble, SFD, header,
// payload, FCS) in one of two frame buffers while a parser checks it on the
// fly, byte by byte as it arrives:
//   - Ethernet: EtherType 0x0800 (IPv4);
//   - IPv4: version 4, IHL >= 5, total length large enough for the headers
//     and not beyond the received frame, not a fragment, header checksum
//     correct, protocol UDP (17) or TCP (6);
//   - UDP: length field equal to the IP payload length; TCP: data offset
//     >= 5;
//   - the transport payload (the bytes after the UDP or TCP header up to the
//     IP total length, so Ethernet padding and FCS are excluded) is fed to a
//     JSON push-down automaton and must be one complete JSON value.
// A frame that passes every check is queued for transmission; any other
// frame, or one received with rx_er, is dropped. While the transmitter is
// sending one buffer the receiver fills the other, so frames leave in
// arrival order with store-and-forward latency; a frame that arrives while
// both buffers are occupied is dropped and counted as an overflow. The
// transmitter leaves at least IFG_CLKS idle clocks between frames.
//
// In passthrough mode the filter is bypassed: the GMII outputs are the
// inputs delayed by one register stage, and every frame passes. The mode
// input is taken over only while no frame is being received, stored or sent,
// so a frame is never cut by a mode change.
//
// Clocking: one clock, the GMII byte clock (125 MHz for 1 Gb/s); inputs are
// sampled and outputs driven on its rising edge.
//
// From the design description: a network packet parser that validates the
// Ethernet, IP and TCP/UDP headers and hands the JSON payload to the PDA,
// with validation mode (failing packets dropped) and passthrough mode (all
// packets pass, no added logic in the path). The exact header checks, the
// two-buffer store-and-forward scheme, the one-register bypass and the
// counters are choices of this implementation; the FCS is not checked here,
// as the receiving MAC checks it.
module packet_validator
  import stl_pkg::*;
#(
  parameter int unsigned FRAME_BYTES = 2048,
  parameter int unsigned MAX_DEPTH   = 16,
  parameter int unsigned IFG_CLKS    = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  dv_mode_e    mode,
  // from the sending MAC
  input  logic        rx_dv,
  input  logic        rx_er,
  input  logic [7:0]  rxd,
  // to the receiving MAC
  output logic        tx_en,
  output logic        tx_er,
  output logic [7:0]  txd,
  // status
  output dv_mode_e    mode_o,
  output logic [15:0] passed_cnt_o,
  output logic [15:0] dropped_cnt_o,
  output logic [15:0] overflow_cnt_o
);

  localparam int unsigned BW = $clog2(FRAME_BYTES);
  localparam logic [7:0]  SFD = 8'hd5;

  typedef enum logic [1:0] {R_IDLE, R_PRE, R_FRAME, R_SKIP} rstate_e;
  typedef enum logic [1:0] {T_IDLE, T_SEND, T_IFG} tstate_e;

  // ------------------------------------------------------------------ buffers
  logic [7:0] buf_mem [2*FRAME_BYTES];
  logic [1:0] full_q;
  logic [BW:0] len_q [2];
  logic       wsel_q, rsel_q;

  // ------------------------------------------------------------------ receive
  rstate_e     rst_q;
  dv_mode_e    mode_q;
  logic        dv_q;
  logic [BW:0] widx_q;        // bytes stored, preamble included
  logic [15:0] fi_q;          // byte index after the SFD
  logic        bad_q;         // a header check failed or rx_er seen
  logic        oversize_q;
  logic [15:0] etype_q, tot_len_q, udp_len_q;
  logic [3:0]  ihl_q, doff_q;
  logic [7:0]  proto_q;
  logic [31:0] csum_q;
  logic [7:0]  hi_q;          // first byte of a 16-bit header field

  // Transport header start and payload window, from the fields seen so far.
  logic [15:0] l4_start, pay_start, pay_end;
  assign l4_start  = 16'd14 + {10'd0, ihl_q, 2'b00};
  assign pay_start = l4_start + ((proto_q == 8'd17) ? 16'd8 : {10'd0, doff_q, 2'b00});
  assign pay_end   = 16'd14 + tot_len_q;

  logic in_frame_byte;
  assign in_frame_byte = (rst_q == R_FRAME) && rx_dv;

  logic in_payload;
  assign in_payload = in_frame_byte && (fi_q >= l4_start + 16'd8) &&
                      (proto_q == 8'd17 || fi_q >= l4_start + 16'd20) &&
                      (fi_q >= pay_start) && (fi_q < pay_end);

  // JSON automaton on the payload bytes.
  logic pda_clear, pda_error, pda_accept, pda_ovf;
  logic [$clog2(MAX_DEPTH+1)-1:0] pda_depth;
  assign pda_clear = (rst_q == R_IDLE);

  json_pda #(.MAX_DEPTH(MAX_DEPTH)) u_pda (
    .clk, .rst_n, .clear(pda_clear), .in_valid(in_payload), .in_data(rxd),
    .error_o(pda_error), .accept_o(pda_accept), .overflow_o(pda_ovf), .depth_o(pda_depth)
  );

  // Verdict at the end of a frame (the clock in which rx_dv has fallen).
  logic [15:0] csum_fold, ip_hdr_len, l4_hdr_len;
  logic        hdr_ok, frame_ok;
  always_comb begin
    logic [31:0] t;
    t          = {16'd0, csum_q[15:0]} + {16'd0, csum_q[31:16]};
    csum_fold  = t[15:0] + t[31:16];
    ip_hdr_len = {10'd0, ihl_q, 2'b00};
    l4_hdr_len = (proto_q == 8'd17) ? 16'd8 : {10'd0, doff_q, 2'b00};
    hdr_ok = (etype_q == 16'h0800) && (ihl_q >= 4'd5) &&
             (proto_q == 8'd17 || proto_q == 8'd6) &&
             (tot_len_q >= ip_hdr_len + l4_hdr_len) &&
             (fi_q >= pay_end) && (csum_fold == 16'hffff) &&
             (proto_q != 8'd17 || udp_len_q == tot_len_q - ip_hdr_len) &&
             (proto_q != 8'd6 || doff_q >= 4'd5);
    frame_ok = hdr_ok && !bad_q && !oversize_q && pda_accept && !pda_error;
  end

  // ----------------------------------------------------------------- transmit
  tstate_e     tst_q;
  logic [BW:0] ridx_q;
  logic [$clog2(IFG_CLKS+1)-1:0] ifg_q;
  logic        tx_en_q;
  logic [7:0]  txd_q;
  logic        byp_en_q, byp_er_q;
  logic [7:0]  byp_d_q;

  logic idle_all;
  assign idle_all = (rst_q == R_IDLE) && !rx_dv && !dv_q && (tst_q == T_IDLE) && (full_q == 2'b00);

  // Buffer write port.
  logic        mem_we;
  logic [BW:0] mem_waddr, mem_raddr;
  logic rx_start_ok;
  assign rx_start_ok = (rst_q == R_IDLE) && rx_dv && !dv_q &&
                       (mode_q == MODE_VALIDATE) && !full_q[wsel_q];
  assign mem_we    = rx_start_ok ||
                     ((rst_q == R_PRE || rst_q == R_FRAME) && rx_dv &&
                      (widx_q < (BW+1)'(FRAME_BYTES)));
  assign mem_waddr = {wsel_q, (rst_q == R_IDLE) ? '0 : widx_q[BW-1:0]};
  assign mem_raddr = {rsel_q, ridx_q[BW-1:0]};

  always_ff @(posedge clk) begin
    if (mem_we) buf_mem[mem_waddr] <= rxd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rst_q          <= R_IDLE;
      mode_q         <= MODE_VALIDATE;
      dv_q           <= 1'b0;
      widx_q         <= '0;
      fi_q           <= '0;
      bad_q          <= 1'b0;
      oversize_q     <= 1'b0;
      etype_q        <= '0;
      tot_len_q      <= '0;
      udp_len_q      <= '0;
      ihl_q          <= '0;
      doff_q         <= '0;
      proto_q        <= '0;
      csum_q         <= '0;
      hi_q           <= '0;
      full_q         <= '0;
      len_q          <= '{default: '0};
      wsel_q         <= 1'b0;
      rsel_q         <= 1'b0;
      tst_q          <= T_IDLE;
      ridx_q         <= '0;
      ifg_q          <= '0;
      tx_en_q        <= 1'b0;
      txd_q          <= '0;
      byp_en_q       <= 1'b0;
      byp_er_q       <= 1'b0;
      byp_d_q        <= '0;
      passed_cnt_o   <= '0;
      dropped_cnt_o  <= '0;
      overflow_cnt_o <= '0;
    end else begin
      dv_q     <= rx_dv;
      byp_en_q <= rx_dv;
      byp_er_q <= rx_er;
      byp_d_q  <= rxd;
      if (idle_all) mode_q <= mode;

      // ---------------- receive side
      case (rst_q)
        R_IDLE: begin
          if (rx_dv && !dv_q) begin
            if (mode_q == MODE_PASSTHROUGH) begin
              rst_q        <= R_SKIP;
              passed_cnt_o <= passed_cnt_o + 16'd1;
            end else if (full_q[wsel_q]) begin
              rst_q          <= R_SKIP;
              overflow_cnt_o <= overflow_cnt_o + 16'd1;
            end else begin
              rst_q      <= (rxd == SFD) ? R_FRAME : R_PRE;
              widx_q     <= (BW+1)'(1);
              fi_q       <= '0;
              bad_q      <= rx_er;
              oversize_q <= 1'b0;
              etype_q    <= '0;
              tot_len_q  <= '0;
              udp_len_q  <= '0;
              ihl_q      <= '0;
              doff_q     <= '0;
              proto_q    <= '0;
              csum_q     <= '0;
            end
          end
        end
        R_PRE: begin
          if (!rx_dv) begin
            rst_q         <= R_IDLE;           // no SFD: runt, drop
            dropped_cnt_o <= dropped_cnt_o + 16'd1;
          end else begin
            widx_q <= widx_q + 1'b1;
            if (rx_er) bad_q <= 1'b1;
            if (rxd == SFD) rst_q <= R_FRAME;
          end
        end
        R_FRAME: begin
          if (rx_dv) begin
            if (widx_q < (BW+1)'(FRAME_BYTES)) widx_q <= widx_q + 1'b1;
            else                               oversize_q <= 1'b1;
            if (rx_er) bad_q <= 1'b1;
            if (fi_q != 16'hffff) fi_q <= fi_q + 16'd1;
            hi_q <= rxd;
            // Header fields.
            if (fi_q == 16'd13) etype_q <= {hi_q, rxd};
            if (fi_q == 16'd14) begin
              ihl_q <= rxd[3:0];
              if (rxd[7:4] != 4'd4) bad_q <= 1'b1;
            end
            if (fi_q == 16'd17) tot_len_q <= {hi_q, rxd};
            if (fi_q == 16'd20 && (rxd[5] || rxd[4:0] != 5'd0)) bad_q <= 1'b1;   // MF, offset
            if (fi_q == 16'd21 && rxd != 8'd0) bad_q <= 1'b1;
            if (fi_q == 16'd23) proto_q <= rxd;
            if (fi_q == 16'd14 || (fi_q > 16'd14 && fi_q < l4_start))
              csum_q <= csum_q + (fi_q[0] ? {24'd0, rxd} : {16'd0, rxd, 8'd0});
            if (fi_q == l4_start + 16'd5)  udp_len_q <= {hi_q, rxd};
            if (fi_q == l4_start + 16'd12) doff_q <= rxd[7:4];
          end else begin
            // End of frame: queue or drop.
            rst_q <= R_IDLE;
            if (frame_ok) begin
              full_q[wsel_q] <= 1'b1;
              len_q[wsel_q]  <= widx_q;
              wsel_q         <= ~wsel_q;
              passed_cnt_o   <= passed_cnt_o + 16'd1;
            end else begin
              dropped_cnt_o  <= dropped_cnt_o + 16'd1;
            end
          end
        end
        R_SKIP: if (!rx_dv) rst_q <= R_IDLE;
        default: rst_q <= R_IDLE;
      endcase

      // ---------------- transmit side
      case (tst_q)
        T_IDLE: begin
          tx_en_q <= 1'b0;
          if (full_q[rsel_q]) begin
            tst_q  <= T_SEND;
            ridx_q <= '0;
          end
        end
        T_SEND: begin
          tx_en_q <= 1'b1;
          txd_q   <= buf_mem[mem_raddr];
          ridx_q  <= ridx_q + 1'b1;
          if (ridx_q + 1'b1 == len_q[rsel_q]) begin
            tst_q <= T_IFG;
            ifg_q <= '0;
          end
        end
        T_IFG: begin
          tx_en_q <= 1'b0;
          ifg_q   <= ifg_q + 1'b1;
          if (ifg_q + 1'b1 == ($clog2(IFG_CLKS+1))'(IFG_CLKS)) begin
            full_q[rsel_q] <= 1'b0;
            rsel_q         <= ~rsel_q;
            tst_q          <= T_IDLE;
          end
        end
        default: tst_q <= T_IDLE;
      endcase
    end
  end

  // Output: bypass register in passthrough mode, frame buffer otherwise.
  assign mode_o = mode_q;
  always_comb begin
    if (mode_q == MODE_PASSTHROUGH) begin
      tx_en = byp_en_q;
      tx_er = byp_er_q;
      txd   = byp_d_q;
    end else begin
      tx_en = tx_en_q;
      tx_er = 1'b0;
      txd   = txd_q;
    end
  end

endmodule
