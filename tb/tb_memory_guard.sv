// tb_memory_guard: self-checking testbench of the Memory Guard.
//
// Two guards sit in front of their own shared BRAM: one with the honeypot
// enabled, one without. Random reads and writes from all four cores hit the
// mailbox segment, the payload segment and addresses outside every segment.
// A permission table written out in the testbench decides which accesses
// must reach memory; a model of the protected memory and of the honeypot
// gives the data every read must return, and the violation pulses are
// counted against the expected number. Denied accesses must leave the
// protected memory untouched, answer OKAY with the honeypot and SLVERR
// without it.
module tb_memory_guard;
  import stl_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;

  // Permission table of the test (mirrors the parameters given below).
  //            mailbox  payload
  // read  :    0,1      0,1,2
  // write :    0,1      0
  localparam logic [3:0] RD [2] = '{4'b0011, 4'b0111};
  localparam logic [3:0] WR [2] = '{4'b0011, 4'b0001};

  axil_req_t s_req [2], m_req [2];
  axil_rsp_t s_rsp [2], m_rsp [2];
  logic      viol [2];
  addr_t     viol_addr [2];
  user_t     viol_core [2];
  logic      viol_write [2];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    memory_guard #(
      .NUM_SEG(2), .NUM_CORES(4),
      .SEG_BASE('{32'h0, 32'h4}), .SEG_SIZE('{32'h4, 32'hffc}),
      .SEG_RD(RD), .SEG_WR(WR),
      .HONEYPOT_EN(g == 0), .HP_WORDS(16)
    ) dut (
      .clk, .rst_n, .s_req(s_req[g]), .s_rsp(s_rsp[g]), .m_req(m_req[g]), .m_rsp(m_rsp[g]),
      .violation_o(viol[g]), .viol_addr_o(viol_addr[g]), .viol_core_o(viol_core[g]),
      .viol_write_o(viol_write[g])
    );
    stl_bram #(.BYTES(8192)) mem (
      .clk, .rst_n, .a_req(m_req[g]), .a_rsp(m_rsp[g]), .b_req(AXIL_REQ_IDLE), .b_rsp()
    );
    axil_bfm bfm (.clk, .req(s_req[g]), .rsp(s_rsp[g]));
  end

  int checks = 0, failures = 0;
  int viol_seen [2] = '{0, 0};
  int viol_want = 0, n_allowed = 0, n_hp = 0;

  always @(posedge clk) for (int g = 0; g < 2; g++) if (viol[g]) viol_seen[g]++;

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit may(addr_t a, int core, bit wr);
    int seg;
    if (a < 4) seg = 0;
    else if (a < 32'h1000) seg = 1;
    else return 0;
    return wr ? WR[seg][core] : RD[seg][core];
  endfunction

  data_t mem_model [2048];
  bit    mem_known [2048];
  data_t hp_model  [16];

  initial begin
    data_t d0, d1;
    axi_resp_e r0, r1;
    for (int i = 0; i < 16; i++) hp_model[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Preload the protected memory with core 0, which may write everywhere
    // except that it may write the mailbox too.
    for (int w = 0; w < 64; w++) begin
      data_t v;
      v = $urandom();
      fork
        g_dut[0].bfm.write(addr_t'(w * 4), v, 2'd0, r0);
        g_dut[1].bfm.write(addr_t'(w * 4), v, 2'd0, r1);
      join
      mem_model[w] = v; mem_known[w] = 1;
      check(r0 == RESP_OKAY && r1 == RESP_OKAY, "preload write allowed");
    end

    for (int i = 0; i < 1500; i++) begin
      addr_t a;
      int core;
      bit wr, ok;
      int w;
      data_t v;
      a    = ($urandom_range(0, 9) == 0) ? addr_t'(32'h1000 + 4 * $urandom_range(0, 63))
                                         : addr_t'(4 * $urandom_range(0, 63));
      core = $urandom_range(0, 3);
      wr   = $urandom_range(0, 1);
      ok   = may(a, core, wr);
      w    = a[12:2];
      v    = $urandom();
      if (!ok) viol_want++; else n_allowed++;
      if (wr) begin
        fork
          g_dut[0].bfm.write(a, v, user_t'(core), r0);
          g_dut[1].bfm.write(a, v, user_t'(core), r1);
        join
        if (ok) begin
          mem_model[w] = v; mem_known[w] = 1;
          check(r0 == RESP_OKAY && r1 == RESP_OKAY, "allowed write OKAY");
        end else begin
          hp_model[a[5:2]] = v;
          n_hp++;
          check(r0 == RESP_OKAY, "denied write looks OKAY with honeypot");
          check(r1 == RESP_SLVERR, "denied write SLVERR without honeypot");
        end
      end else begin
        fork
          g_dut[0].bfm.read(a, user_t'(core), d0, r0);
          g_dut[1].bfm.read(a, user_t'(core), d1, r1);
        join
        if (ok) begin
          if (mem_known[w]) check(d0 == mem_model[w] && d1 == mem_model[w],
                                  $sformatf("allowed read %h: %h/%h want %h", a, d0, d1, mem_model[w]));
          check(r0 == RESP_OKAY && r1 == RESP_OKAY, "allowed read OKAY");
        end else begin
          check(d0 == hp_model[a[5:2]] && r0 == RESP_OKAY,
                $sformatf("denied read %h served by honeypot: %h want %h", a, d0, hp_model[a[5:2]]));
          check(d1 == '0 && r1 == RESP_SLVERR, "denied read SLVERR without honeypot");
          check(viol_addr[0] == a && viol_core[0] == user_t'(core) && !viol_write[0], "violation report");
        end
      end
    end

    // The protected memory was never changed by a denied write.
    for (int w = 0; w < 64; w++) begin
      g_dut[0].bfm.read(addr_t'(w * 4), 2'd0, d0, r0);
      check(d0 == mem_model[w], $sformatf("protected word %0d intact", w));
    end

    repeat (2) @(negedge clk);
    check(viol_seen[0] == viol_want && viol_seen[1] == viol_want,
          $sformatf("violations %0d/%0d want %0d", viol_seen[0], viol_seen[1], viol_want));
    check(n_allowed > 100 && n_hp > 50, "both allowed and denied accesses exercised");
    $display("allowed=%0d denied=%0d honeypot writes=%0d", n_allowed, viol_want, n_hp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
