// tb_cds_top: end-to-end testbench of the whole design at its default sizes.
//
// Plays the two virtual machines of the round-trip measurements:
//  - Secure Transfer Link: VM0 (core 0) writes a JSON message into link 0,
//    VM1 (core 1) polls for it, reads it and writes it back into link 1, and
//    VM0 reads the echo and compares it with what it sent. Messages are the
//    sample record, random JSON of depth 1 to 15 and one of the 1472-byte
//    maximum; invalid JSON must be dropped with the drop interrupt in
//    validation mode and delivered in passthrough mode; VM1 writing into
//    VM0's origin BRAM must be a Memory Guard violation that leaves the data
//    alone; a second message must wait while the receiver has not emptied
//    its mailbox.
//    A size sweep sends valid messages of 1 to 1472 bytes round the link in
//    both modes and prints the clocks each round trip took.
//  - Fixed link: VM0's MAC sends UDP/IPv4 frames carrying JSON through
//    filter 0 to VM1's MAC, which echoes each through filter 1 with source
//    and destination (MAC, IP, port) swapped, as an echo server would; the
//    same size sweep is run in validation mode. Invalid
//    payloads are dropped, a burst overflows the two buffers, and after a
//    mode switch to passthrough frames go through the one-register bypass.
// Each of these mechanisms is counted and a count of zero is a failure. The
// time a 1472-byte message takes through one Data Validator is checked
// against the 24 Mb/s of the grammar checker the design was derived from.
module tb_cds_top;
  import stl_pkg::*;
  import json_ref::*;
  import eth_frames::*;

  logic clk = 1'b0, rst_n = 1'b0, gmii_clk = 1'b0, gmii_rst_n = 1'b0;
  logic [1:0] stl_enable = '0, stl_drop_irq, stl_drop_ack = '0, stl_tx_viol, stl_rx_viol;
  dv_mode_e [1:0] stl_mode = {MODE_VALIDATE, MODE_VALIDATE};
  dv_mode_e [1:0] fix_mode = {MODE_VALIDATE, MODE_VALIDATE}, fix_mode_active;
  logic [1:0][15:0] stl_passed, stl_dropped, fix_passed, fix_dropped, fix_overflow;
  axil_req_t vm0_tx_req, vm1_rx_req, vm1_tx_req, vm0_rx_req;
  axil_rsp_t vm0_tx_rsp, vm1_rx_rsp, vm1_tx_rsp, vm0_rx_rsp;
  logic mac0_tx_en = 0, mac0_tx_er = 0, mac1_tx_en = 0, mac1_tx_er = 0;
  logic [7:0] mac0_txd = '0, mac1_txd = '0;
  logic mac0_rx_dv, mac0_rx_er, mac1_rx_dv, mac1_rx_er;
  logic [7:0] mac0_rxd, mac1_rxd;

  cds_top dut (
    .clk, .rst_n, .stl_enable, .stl_mode,
    .vm0_tx_req, .vm0_tx_rsp, .vm1_rx_req, .vm1_rx_rsp,
    .vm1_tx_req, .vm1_tx_rsp, .vm0_rx_req, .vm0_rx_rsp,
    .stl_drop_irq, .stl_drop_ack, .stl_tx_violation(stl_tx_viol), .stl_rx_violation(stl_rx_viol),
    .stl_passed_cnt(stl_passed), .stl_dropped_cnt(stl_dropped),
    .gmii_clk, .gmii_rst_n, .fix_mode,
    .mac0_tx_en, .mac0_tx_er, .mac0_txd, .mac0_rx_dv, .mac0_rx_er, .mac0_rxd,
    .mac1_tx_en, .mac1_tx_er, .mac1_txd, .mac1_rx_dv, .mac1_rx_er, .mac1_rxd,
    .fix_mode_active, .fix_passed_cnt(fix_passed), .fix_dropped_cnt(fix_dropped),
    .fix_overflow_cnt(fix_overflow)
  );

  axil_bfm b_vm0_tx (.clk, .req(vm0_tx_req), .rsp(vm0_tx_rsp));
  axil_bfm b_vm1_rx (.clk, .req(vm1_rx_req), .rsp(vm1_rx_rsp));
  axil_bfm b_vm1_tx (.clk, .req(vm1_tx_req), .rsp(vm1_tx_rsp));
  axil_bfm b_vm0_rx (.clk, .req(vm0_rx_req), .rsp(vm0_rx_rsp));

  always #5 clk = ~clk;            // 100 MHz fabric clock
  always #4 gmii_clk = ~gmii_clk;  // 125 MHz GMII clock

  int checks = 0, failures = 0;
  int n_roundtrip = 0, n_stl_drop = 0, n_stl_thru = 0, n_viol = 0, n_wait = 0;
  int n_fix_echo = 0, n_fix_drop = 0, n_fix_ovf = 0, n_fix_bypass = 0, n_mode_switch = 0;
  int n_stl_sweep = 0, n_fix_sweep = 0;

  initial begin
    repeat (4000000) @(posedge clk);
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

  function automatic data_t pack(string m, int w);
    data_t v;
    v = '0;
    for (int k = 0; k < 4; k++) if (4 * w + k < m.len()) v[8*k +: 8] = m[4*w + k];
    return v;
  endfunction

  // ------------------------------------------------ STL software of a VM
  task automatic stl_write(int link, string m);
    axi_resp_e r;
    user_t core;
    core = (link == 0) ? 2'd0 : 2'd1;
    for (int w = 0; w < (m.len() + 3) / 4; w++) begin
      if (link == 0) b_vm0_tx.write(addr_t'(4 + 4 * w), pack(m, w), core, r);
      else           b_vm1_tx.write(addr_t'(4 + 4 * w), pack(m, w), core, r);
    end
    if (link == 0) b_vm0_tx.write(32'h0, data_t'(m.len()) | 32'h8000_0000, core, r);
    else           b_vm1_tx.write(32'h0, data_t'(m.len()) | 32'h8000_0000, core, r);
  endtask

  task automatic stl_wait_released(int link);
    axi_resp_e r;
    data_t d;
    do begin
      if (link == 0) b_vm0_tx.read(32'h0, 2'd0, d, r);
      else           b_vm1_tx.read(32'h0, 2'd1, d, r);
    end while (d[31]);
  endtask

  // Read the destination of a link; returns 0 if nothing is there.
  task automatic stl_read(int link, output bit got, output string m);
    axi_resp_e r;
    data_t d;
    user_t core;
    int len;
    core = (link == 0) ? 2'd1 : 2'd0;
    if (link == 0) b_vm1_rx.read(32'h0, core, d, r); else b_vm0_rx.read(32'h0, core, d, r);
    got = d[31];
    m = "";
    if (!got) return;
    len = d[15:0];
    for (int w = 0; w < (len + 3) / 4; w++) begin
      if (link == 0) b_vm1_rx.read(addr_t'(4 + 4 * w), core, d, r);
      else           b_vm0_rx.read(addr_t'(4 + 4 * w), core, d, r);
      for (int k = 0; k < 4; k++) if (4 * w + k < len) m = {m, string'(byte'(d[8*k +: 8]))};
    end
    if (link == 0) b_vm1_rx.write(32'h0, 32'h0, core, r); else b_vm0_rx.write(32'h0, 32'h0, core, r);
  endtask

  task automatic ack_drop(int link);
    @(negedge clk) stl_drop_ack[link] = 1'b1;
    @(negedge clk) stl_drop_ack[link] = 1'b0;
  endtask

  // One full round trip VM0 -> VM1 -> VM0; returns clocks taken.
  task automatic round_trip(string m, bit want, output int clocks);
    bit got;
    string back;
    longint t0;
    t0 = $time;
    stl_write(0, m);
    stl_wait_released(0);
    stl_read(0, got, back);
    check(got == want, $sformatf("link 0 delivered=%0d want %0d", got, want));
    if (!got) begin
      check(stl_drop_irq[0], "link 0 drop interrupt");
      ack_drop(0);
      clocks = 0;
      return;
    end
    check(back == m, "VM1 received what VM0 sent");
    stl_write(1, back);
    stl_wait_released(1);
    stl_read(1, got, back);
    check(got && back == m, "VM0 received its echo");
    clocks = int'(($time - t0) / 10);
  endtask

  // ------------------------------------------------ GMII side of the MACs
  bytes_t rx0_q [$], rx1_q [$], cur0, cur1;
  always @(posedge gmii_clk) begin
    if (mac1_rx_dv) cur1.push_back(mac1_rxd);
    else if (cur1.size() != 0) begin rx1_q.push_back(cur1); cur1 = {}; end
    if (mac0_rx_dv) cur0.push_back(mac0_rxd);
    else if (cur0.size() != 0) begin rx0_q.push_back(cur0); cur0 = {}; end
  end

  task automatic mac_send(int mac, bytes_t f, int gap);
    @(negedge gmii_clk);
    foreach (f[i]) begin
      if (mac == 0) begin mac0_tx_en = 1; mac0_txd = f[i]; end
      else          begin mac1_tx_en = 1; mac1_txd = f[i]; end
      @(negedge gmii_clk);
    end
    mac0_tx_en = 0; mac1_tx_en = 0;
    repeat (gap) @(negedge gmii_clk);
  endtask

  // The echo server answers with source and destination swapped: MAC
  // addresses (frame bytes 8-13 / 14-19), IPv4 addresses (34-37 / 38-41) and
  // UDP ports (42-43 / 44-45). The IPv4 checksum is unchanged by the swap.
  function automatic bytes_t swap_ends(bytes_t f);
    bytes_t g;
    g = f;
    for (int k = 0; k < 6; k++) begin g[8 + k] = f[14 + k]; g[14 + k] = f[8 + k]; end
    for (int k = 0; k < 4; k++) begin g[34 + k] = f[38 + k]; g[38 + k] = f[34 + k]; end
    for (int k = 0; k < 2; k++) begin g[42 + k] = f[44 + k]; g[44 + k] = f[42 + k]; end
    return g;
  endfunction

  // VM0 sends a UDP datagram, VM1 echoes it if it arrives; returns the GMII
  // clocks from the first byte sent to the last byte of the echo received.
  task automatic udp_echo(string payload, bit want, output int clocks);
    bytes_t f, g;
    frame_opts_t ok;
    longint t0;
    ok = '{default: 0};
    clocks = 0;
    f = build(payload, ok);
    t0 = $time;
    mac_send(0, f, f.size() + 40);
    check(rx0_q.size() == 0, "MAC 0 received nothing while only it was sending");
    check((rx1_q.size() != 0) == want, $sformatf("fixed link 0 forwarded=%0d want %0d", rx1_q.size() != 0, want));
    if (rx1_q.size() == 0) begin n_fix_drop++; return; end
    g = rx1_q.pop_front();
    check(g == f, "MAC 1 received the frame MAC 0 sent");
    g = swap_ends(g);
    mac_send(1, g, 0);
    while (rx0_q.size() == 0 && ($time - t0) < 64'd200000) @(negedge gmii_clk);
    clocks = int'(($time - t0) / 8);
    check(rx0_q.size() != 0 && rx0_q[0] == g, "MAC 0 received the echo from MAC 1");
    if (rx0_q.size() != 0) void'(rx0_q.pop_front());
    repeat (40) @(negedge gmii_clk);
    n_fix_echo++;
  endtask

  // Valid JSON of exactly n bytes: a random value of nesting up to 15 that
  // fits, padded with trailing white space. (gen_value may end a branch in
  // an empty object, one level below its target, hence the target of 14.)
  function automatic string sized_json(int n);
    string m;
    int d;
    if (n == 1) return "7";
    d = (n / 2 < 14) ? n / 2 : 14;
    m = "";
    for (int t = 0; t < 40 && m.len() == 0; t++) begin
      m = gen_value(0, d);
      if (m.len() > n) m = "";
    end
    if (m.len() == 0) begin
      for (int k = 0; k < d; k++) m = {"[", m, "]"};
    end
    while (m.len() < n) m = {m, " "};
    return m;
  endfunction

  // Message sizes of the round-trip measurements, 1 to 1472 bytes.
  localparam int NSIZES = 8;
  localparam int SIZES [NSIZES] = '{1, 2, 16, 64, 256, 512, 1024, 1472};

  // ------------------------------------------------ STL scenario
  initial begin : stl_thread
    string m, big, back;
    bit got;
    int clocks;
    axi_resp_e r;
    data_t d;
    longint t0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    // Software initialises the four mailboxes, then enables the links.
    b_vm0_tx.write(32'h0, 0, 2'd0, r); b_vm1_rx.write(32'h0, 0, 2'd1, r);
    b_vm1_tx.write(32'h0, 0, 2'd1, r); b_vm0_rx.write(32'h0, 0, 2'd0, r);
    stl_enable = 2'b11;

    round_trip("{\"LabIV8E\": -2006, \"q3\": false, \"1CP\": 724.8507268121102, \"cOPY4K\": \"VwxslZatE\", \"2Mfz6\": 424}", 1, clocks);
    n_roundtrip++;
    $display("sample record round trip: %0d clocks", clocks);
    for (int i = 0; i < 15; i++) begin
      do m = gen_value(0, i); while (m.len() > MAX_MSG_BYTES);
      round_trip(m, 1, clocks);
      n_roundtrip++;
    end

    // 1472-byte message: time through one Data Validator.
    big = "[";
    while (big.len() < 1460) big = {big, "\"abcdefgh\","};
    big = {big, "0"};
    while (big.len() < 1471) big = {big, " "};
    big = {big, "]"};
    check(big.len() == 1472, "maximum message length");
    stl_write(0, big);
    t0 = $time;
    stl_wait_released(0);
    clocks = int'(($time - t0) / 10);
    $display("1472-byte message through the Data Validator: %0d clocks", clocks);
    check(clocks < 1472 * 8 * 100 / 24, "faster than a 24 Mb/s grammar checker at 100 MHz");
    stl_read(0, got, back);
    check(got && back == big, "1472-byte message delivered");
    n_roundtrip++;

    // Invalid JSON is dropped.
    round_trip("{\"q3\": fals, \"a\": 1}", 0, clocks);
    n_stl_drop++;

    // Memory Guard: VM1 writes VM0's origin BRAM.
    stl_write(0, "[1, 2, 3]");
    b_vm0_tx.write(32'h4, 32'h2020_2020, 2'd1, r);
    check(r == RESP_OKAY, "violation answered as success");
    stl_wait_released(0);
    stl_read(0, got, back);
    check(got && back == "[1, 2, 3]", "violating write did not reach the BRAM");

    // Receiver has not emptied its mailbox: the second message waits.
    stl_write(0, "[true]");
    stl_wait_released(0);
    stl_write(0, "[false]");
    repeat (300) @(negedge clk);
    b_vm0_tx.read(32'h0, 2'd0, d, r);
    check(d[31] == 1'b1, "second message held back");
    stl_read(0, got, back);
    check(got && back == "[true]", "first message");
    stl_wait_released(0);
    stl_read(0, got, back);
    check(got && back == "[false]", "second message after the wait");
    n_wait++;

    // Size sweep: round trips of 1 to 1472 bytes in both modes.
    for (int md = 0; md < 2; md++) begin
      stl_mode = (md != 0) ? {MODE_PASSTHROUGH, MODE_PASSTHROUGH} : {MODE_VALIDATE, MODE_VALIDATE};
      for (int i = 0; i < NSIZES; i++) begin
        m = sized_json(SIZES[i]);
        check(m.len() == SIZES[i] && ref_valid(m, 15), "sweep message size and validity");
        round_trip(m, 1, clocks);
        $display("STL %s %4d bytes: round trip %0d clocks (%0d ns one way)",
                 (md != 0) ? "passthrough" : "validation ", SIZES[i], clocks, clocks * 10 / 2);
        n_stl_sweep++;
      end
    end
    stl_mode = {MODE_VALIDATE, MODE_VALIDATE};

    // Passthrough mode delivers invalid JSON.
    stl_mode = {MODE_PASSTHROUGH, MODE_PASSTHROUGH};
    round_trip("{\"q3\": fals, \"a\": 1}", 1, clocks);
    n_stl_thru++;
    $display("passthrough round trip of 20 bytes: %0d clocks", clocks);
    stl_mode = {MODE_VALIDATE, MODE_VALIDATE};
    check(stl_dropped[0] == 16'(n_stl_drop), "link 0 drop counter");
  end

  always @(posedge clk) n_viol += int'(stl_tx_viol[0]) + int'(stl_tx_viol[1]) +
                                  int'(stl_rx_viol[0]) + int'(stl_rx_viol[1]);

  // ------------------------------------------------ fixed-link scenario
  initial begin : fix_thread
    string j;
    int clocks;
    bytes_t f1, f2, f3;
    frame_opts_t ok;
    ok = '{default: 0};
    repeat (5) @(negedge gmii_clk);
    gmii_rst_n = 1'b1;
    repeat (5) @(negedge gmii_clk);
    udp_echo("{\"LabIV8E\": -2006, \"q3\": false, \"2Mfz6\": 424}", 1, clocks);
    for (int i = 0; i < 15; i++) begin
      do j = gen_value(0, i); while (j.len() > MAX_MSG_BYTES);
      udp_echo(j, 1, clocks);
    end
    udp_echo("{\"q3\": fals}", 0, clocks);

    // Size sweep: UDP payloads of 1 to 1472 bytes in validation mode.
    for (int i = 0; i < NSIZES; i++) begin
      j = sized_json(SIZES[i]);
      udp_echo(j, 1, clocks);
      $display("fixed link validation %4d bytes: round trip %0d GMII clocks", SIZES[i], clocks);
      n_fix_sweep++;
    end

    // Burst: long frame then two short ones.
    j = "[";
    while (j.len() < 1400) j = {j, "123456789,"};
    f1 = build({j, "0]"}, ok); f2 = build("[2]", ok); f3 = build("[3]", ok);
    mac_send(0, f1, 12); mac_send(0, f2, 12); mac_send(0, f3, 3000);
    check(rx1_q.size() == 2, "burst: two of three frames forwarded");
    rx1_q = {};
    n_fix_ovf = int'(fix_overflow[0]);

    // Mode switch to passthrough.
    fix_mode = {MODE_PASSTHROUGH, MODE_PASSTHROUGH};
    repeat (4) @(negedge gmii_clk);
    if (fix_mode_active == {MODE_PASSTHROUGH, MODE_PASSTHROUGH}) n_mode_switch++;
    udp_echo("{\"q3\": fals}", 1, clocks);
    n_fix_bypass++;
  end

  initial begin
    fork
      wait (n_stl_thru > 0);
      wait (n_fix_bypass > 0);
    join
    repeat (10) @(negedge clk);
    check(n_viol == 1, $sformatf("one Memory Guard violation, saw %0d", n_viol));
    check(n_stl_sweep == 2 * NSIZES && n_fix_sweep == NSIZES, "every size of the sweep ran");
    check(n_roundtrip > 0 && n_stl_drop > 0 && n_stl_thru > 0 && n_viol > 0 && n_wait > 0,
          "every STL mechanism happened");
    check(n_fix_echo > 0 && n_fix_drop > 0 && n_fix_ovf > 0 && n_fix_bypass > 0 && n_mode_switch > 0,
          "every fixed-link mechanism happened");
    $display("STL: round trips=%0d drops=%0d passthrough=%0d violations=%0d waits=%0d",
             n_roundtrip, n_stl_drop, n_stl_thru, n_viol, n_wait);
    $display("fixed link: echoes=%0d drops=%0d overflows=%0d bypassed=%0d mode switches=%0d",
             n_fix_echo, n_fix_drop, n_fix_ovf, n_fix_bypass, n_mode_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
