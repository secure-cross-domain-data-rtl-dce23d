// tb_stl_link: self-checking testbench of one Secure Transfer Link direction.
//
// Core 0 (the sending VM) writes messages through the sender port; core 1
// (the receiving VM) polls and reads them through the receiver port. Valid
// JSON must arrive byte for byte, invalid JSON must be dropped with the drop
// interrupt. Against the one-way rule, the testbench also makes the receiver
// write into the payload, the sender read the destination and a third core
// touch both sides: each must be a violation, served by the honeypot, and
// must leave the transferred data unchanged.
module tb_stl_link;
  import stl_pkg::*;
  import json_ref::*;

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic drop_irq, drop_ack = 1'b0, tx_viol, rx_viol;
  logic [15:0] passed, dropped;
  axil_req_t tx_req, rx_req;
  axil_rsp_t tx_rsp, rx_rsp;

  stl_link dut (
    .clk, .rst_n, .enable, .mode(MODE_VALIDATE),
    .tx_req, .tx_rsp, .rx_req, .rx_rsp,
    .drop_irq_o(drop_irq), .drop_ack_i(drop_ack),
    .tx_violation_o(tx_viol), .rx_violation_o(rx_viol),
    .passed_cnt_o(passed), .dropped_cnt_o(dropped)
  );

  axil_bfm vm_tx (.clk, .req(tx_req), .rsp(tx_rsp));
  axil_bfm vm_rx (.clk, .req(rx_req), .rsp(rx_rsp));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_viol = 0, want_viol = 0, n_pass = 0, n_drop = 0;
  always @(posedge clk) n_viol += int'(tx_viol) + int'(rx_viol);

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

  function automatic data_t pack(string m, int w);
    data_t v;
    v = '0;
    for (int k = 0; k < 4; k++) if (4 * w + k < m.len()) v[8*k +: 8] = m[4*w + k];
    return v;
  endfunction

  task automatic transfer(string m, bit want);
    axi_resp_e r;
    data_t d;
    int words;
    words = (m.len() + 3) / 4;
    for (int w = 0; w < words; w++) vm_tx.write(addr_t'(4 + 4 * w), pack(m, w), 2'd0, r);
    vm_tx.write(32'h0, data_t'(m.len()) | 32'h8000_0000, 2'd0, r);
    do vm_tx.read(32'h0, 2'd0, d, r); while (d[31]);
    vm_rx.read(32'h0, 2'd1, d, r);
    check(d[31] == want, $sformatf("delivered=%0d want %0d: %s", d[31], want, m));
    if (d[31]) begin
      // Attacks from the receiver and the sender while the message sits there.
      vm_rx.write(32'h4, 32'h4141_4141, 2'd1, r);        // receiver writes payload
      check(r == RESP_OKAY, "denied write looks successful");
      want_viol++;
      vm_rx.read(32'h4, 2'd0, d, r);                      // sender core reads destination
      check(d == 32'h4141_4141, "denied read served from the honeypot");
      want_viol++;
      vm_tx.read(32'h4, 2'd2, d, r);                      // third core reads origin
      want_viol++;
      for (int w = 0; w < words; w++) begin
        data_t got, exp;
        vm_rx.read(addr_t'(4 + 4 * w), 2'd1, got, r);
        exp = pack(m, w);
        for (int k = 0; k < 4; k++)
          if (4 * w + k < m.len()) check(got[8*k +: 8] == exp[8*k +: 8], $sformatf("byte %0d", 4*w+k));
      end
      vm_rx.write(32'h0, 32'h0, 2'd1, r);
      n_pass++;
    end else begin
      check(drop_irq, "drop interrupt");
      @(negedge clk) drop_ack = 1'b1;
      @(negedge clk) drop_ack = 1'b0;
      n_drop++;
    end
  endtask

  initial begin
    string m;
    axi_resp_e r;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    vm_tx.write(32'h0, 32'h0, 2'd0, r);
    vm_rx.write(32'h0, 32'h0, 2'd1, r);
    enable = 1'b1;   // mailboxes are empty now
    transfer("{\"LabIV8E\": -2006, \"q3\": false, \"1CP\": 724.8507268121102, \"cOPY4K\": \"VwxslZatE\", \"2Mfz6\": 424}", 1);
    transfer("{\"q3\": fals}", 0);
    for (int i = 0; i < 20; i++) begin
      m = gen_value(0, i % 15);
      if (i % 3 == 2) m[$urandom_range(0, m.len() - 1)] = ",";
      transfer(m, ref_valid(m, 16));
    end
    repeat (2) @(negedge clk);
    check(n_viol == want_viol, $sformatf("violations %0d want %0d", n_viol, want_viol));
    check(passed == 16'(n_pass) && dropped == 16'(n_drop), "link counters");
    check(n_pass > 5 && n_drop > 2, "both verdicts exercised");
    $display("passed=%0d dropped=%0d violations=%0d", n_pass, n_drop, n_viol);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
