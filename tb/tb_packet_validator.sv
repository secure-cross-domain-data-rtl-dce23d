// tb_packet_validator: self-checking testbench of the fixed-link packet
// filter.
//
// Drives GMII frames built by eth_frames and records every frame that leaves
// the filter. In validation mode a frame must come out, byte for byte and in
// order, exactly when its headers are well formed and its payload is valid
// JSON (decided by the json_ref reference checker); frames with a broken
// EtherType, IP version, header checksum, UDP length, a fragment, rx_er, or
// bad JSON must not. A long frame followed closely by two short ones must
// overflow the two buffers once. In passthrough mode every frame must come
// out unchanged one clock after it went in. Counts how often each case
// happened and fails if one never did.
module tb_packet_validator;
  import stl_pkg::*;
  import json_ref::*;
  import eth_frames::*;

  logic clk = 1'b0, rst_n = 1'b0;
  dv_mode_e mode = MODE_VALIDATE, mode_o;
  logic rx_dv = 1'b0, rx_er = 1'b0;
  logic [7:0] rxd = '0;
  logic tx_en, tx_er;
  logic [7:0] txd;
  logic [15:0] passed, dropped, overflow;

  packet_validator dut (
    .clk, .rst_n, .mode, .rx_dv, .rx_er, .rxd, .tx_en, .tx_er, .txd, .mode_o,
    .passed_cnt_o(passed), .dropped_cnt_o(dropped), .overflow_cnt_o(overflow)
  );

  always #4 clk = ~clk;   // 125 MHz GMII clock

  int checks = 0, failures = 0;
  int n_pass = 0, n_drop = 0, n_ovf = 0, n_bypass = 0, n_tcp = 0;

  initial begin
    repeat (2000000) @(posedge clk);
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

  // Output monitor: collect frames and the time their first byte left.
  bytes_t out_q [$];
  longint out_t [$];
  bytes_t cur;
  longint cur_t;
  always @(posedge clk) begin
    if (tx_en) begin
      if (cur.size() == 0) cur_t = $time;
      cur.push_back(txd);
    end else if (cur.size() != 0) begin
      out_q.push_back(cur);
      out_t.push_back(cur_t);
      cur = {};
    end
  end

  bytes_t exp_q [$];
  longint in_t;

  task automatic drive(bytes_t f, int gap = 12, bit err = 0);
    @(negedge clk);
    in_t = $time + 4;
    foreach (f[i]) begin
      rx_dv = 1'b1;
      rxd   = f[i];
      rx_er = err && (i == 30);
      @(negedge clk);
    end
    rx_dv = 1'b0; rx_er = 1'b0;
    repeat (gap) @(negedge clk);
  endtask

  task automatic send(string payload, frame_opts_t o, bit want, bit err = 0);
    bytes_t f;
    f = build(payload, o);
    if (want) exp_q.push_back(f);
    drive(f, f.size() + 40, err);   // the previous frame has left before the next arrives
    if (want) n_pass++; else n_drop++;
  endtask

  task automatic drain_and_compare();
    repeat (4000) @(negedge clk);
    check(out_q.size() == exp_q.size(), $sformatf("frames out %0d want %0d", out_q.size(), exp_q.size()));
    while (out_q.size() != 0 && exp_q.size() != 0) begin
      bytes_t a, b;
      a = out_q.pop_front();
      b = exp_q.pop_front();
      check(a == b, "forwarded frame identical to the frame sent");
    end
    out_q = {}; out_t = {}; exp_q = {};
  endtask

  initial begin
    frame_opts_t ok, o;
    string j;
    int p0, d0;
    ok = '{default: 0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    // Validation mode: good and bad frames.
    send("{\"LabIV8E\": -2006, \"q3\": false, \"1CP\": 724.8507268121102, \"cOPY4K\": \"VwxslZatE\", \"2Mfz6\": 424}", ok, 1);
    send("{\"q3\": fals}", ok, 0);
    o = ok; o.tcp = 1;           send("[1, 2, {\"a\": null}]", o, 1); n_tcp++;
    o = ok; o.bad_ethertype = 1; send("[1]", o, 0);
    o = ok; o.bad_checksum = 1;  send("[1]", o, 0);
    o = ok; o.bad_version = 1;   send("[1]", o, 0);
    o = ok; o.bad_udp_len = 1;   send("[1]", o, 0);
    o = ok; o.fragment = 1;      send("[1]", o, 0);
    send("[1]", ok, 0, 1);       // rx_er inside the frame
    send("7", ok, 1);            // short payload, padded frame
    j = "[";
    while (j.len() < 2000) j = {j, "123456789,"};
    send({j, "0]"}, ok, 0);      // longer than a frame buffer
    for (int i = 0; i < 30; i++) begin
      do j = gen_value(0, i % 15); while (j.len() > 1472);   // one UDP datagram
      if (i % 4 == 3) j[$urandom_range(0, j.len() - 1)] = "}";
      send(j, ok, ref_valid(j, 16));
    end
    drain_and_compare();
    check(passed == 16'(n_pass) && dropped == 16'(n_drop), "pass/drop counters");

    // Overflow: a long frame, then two short ones close behind it.
    j = "[";
    while (j.len() < 1400) j = {j, "123456789,"};
    j = {j, "0]"};
    begin
      bytes_t f1, f2, f3;
      f1 = build(j, ok); f2 = build("[2]", ok); f3 = build("[3]", ok);
      exp_q.push_back(f1); exp_q.push_back(f2);
      drive(f1, 12); drive(f2, 12); drive(f3, 12);
    end
    drain_and_compare();
    check(overflow == 16'd1, $sformatf("one overflow, got %0d", overflow));
    n_ovf = overflow;

    // Passthrough: everything is forwarded one clock later, bad JSON included.
    mode = MODE_PASSTHROUGH;
    repeat (5) @(negedge clk);
    check(mode_o == MODE_PASSTHROUGH, "mode switch taken while idle");
    p0 = passed; d0 = dropped;
    for (int i = 0; i < 5; i++) begin
      bytes_t f;
      f = build((i % 2) ? "{\"x\": }" : "[true]", ok);
      exp_q.push_back(f);
      drive(f, 12);
      repeat (3) @(negedge clk);
      check(out_t.size() != 0 && out_t[out_t.size()-1] - in_t == 8, "bypass latency one clock");
      n_bypass++;
    end
    drain_and_compare();
    check(passed == 16'(p0 + 5) && dropped == 16'(d0), "passthrough counters");

    check(n_pass > 5 && n_drop > 5 && n_ovf > 0 && n_bypass > 0 && n_tcp > 0, "every case exercised");
    $display("passed=%0d dropped=%0d overflow=%0d bypassed=%0d", n_pass, n_drop, n_ovf, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
