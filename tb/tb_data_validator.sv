// tb_data_validator: self-checking testbench of the Data Validator.
//
// The validator sits between two shared BRAMs. A sender task writes a
// message and the origin mailbox through the other port of the origin BRAM
// and waits until the validator releases the mailbox; a receiver task
// reads the destination mailbox and payload and clears the mailbox. The
// verdict (delivered or dropped) is compared with the JSON reference
// checker, delivered bytes with the message sent, and dropped messages must
// leave both payload areas zero and raise the drop interrupt. Covered: valid
// and invalid JSON in validation mode, invalid JSON in passthrough mode, an
// illegal length, a message of the 1472-byte maximum, and the wait for a
// receiver that has not yet emptied the destination mailbox.
module tb_data_validator;
  import stl_pkg::*;
  import json_ref::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic enable = 1'b0;
  dv_mode_e mode = MODE_VALIDATE;
  logic drop_irq, drop_ack = 1'b0, busy;
  logic [15:0] passed, dropped;

  axil_req_t o_req, d_req, s_req, r_req;
  axil_rsp_t o_rsp, d_rsp, s_rsp, r_rsp;

  data_validator dut (
    .clk, .rst_n, .enable, .mode, .o_req, .o_rsp, .d_req, .d_rsp,
    .drop_irq_o(drop_irq), .drop_ack_i(drop_ack), .busy_o(busy),
    .passed_cnt_o(passed), .dropped_cnt_o(dropped)
  );

  stl_bram origin (.clk, .rst_n, .a_req(s_req), .a_rsp(s_rsp), .b_req(o_req), .b_rsp(o_rsp));
  stl_bram dest   (.clk, .rst_n, .a_req(r_req), .a_rsp(r_rsp), .b_req(d_req), .b_rsp(d_rsp));
  axil_bfm sender   (.clk, .req(s_req), .rsp(s_rsp));
  axil_bfm receiver (.clk, .req(r_req), .rsp(r_rsp));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_pass = 0, n_drop = 0, n_wait = 0, n_thru = 0;

  initial begin
    repeat (3000000) @(posedge clk);
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

  // Write a message and its mailbox; return once the validator released it.
  task automatic send(string m, int len);
    axi_resp_e r;
    data_t d;
    for (int w = 0; w < (m.len() + 3) / 4; w++) sender.write(addr_t'(4 + 4 * w), pack(m, w), 2'd0, r);
    sender.write(32'h0, data_t'(len) | 32'h8000_0000, 2'd0, r);
    do sender.read(32'h0, 2'd0, d, r); while (d[31]);
  endtask

  // Zero both payload areas so that a drop can be seen to clear them.
  task automatic wipe(int words);
    axi_resp_e r;
    for (int w = 0; w < words; w++) begin
      sender.write(addr_t'(4 + 4 * w), 32'hdead_beef, 2'd0, r);
      receiver.write(addr_t'(4 + 4 * w), 32'hdead_beef, 2'd0, r);
    end
  endtask

  // Send one message and check the verdict and the two BRAMs.
  task automatic transfer(string m, bit want_pass, string what);
    axi_resp_e r;
    data_t d;
    int words;
    int p0, d0;
    words = (m.len() + 3) / 4;
    wipe(words);
    p0 = passed; d0 = dropped;
    send(m, m.len());
    receiver.read(32'h0, 2'd1, d, r);
    check(d[31] == want_pass, $sformatf("%s: delivered=%0d want %0d", what, d[31], want_pass));
    if (d[31]) begin
      check(d[15:0] == 16'(m.len()), "delivered length");
      for (int w = 0; w < words; w++) begin
        data_t got, exp;
        receiver.read(addr_t'(4 + 4 * w), 2'd1, got, r);
        exp = pack(m, w);
        for (int k = 0; k < 4; k++)
          if (4 * w + k < m.len()) check(got[8*k +: 8] == exp[8*k +: 8], $sformatf("%s: byte %0d", what, 4*w+k));
      end
      receiver.write(32'h0, 32'h0, 2'd1, r);
      check(passed == 16'(p0 + 1) && !drop_irq, "pass counted, no drop interrupt");
      n_pass++;
    end else begin
      for (int w = 0; w < words; w++) begin
        data_t a, b;
        sender.read(addr_t'(4 + 4 * w), 2'd0, a, r);
        receiver.read(addr_t'(4 + 4 * w), 2'd1, b, r);
        check(a == '0, $sformatf("%s: origin word %0d cleared", what, w));
        check(b == '0 || b == 32'hdead_beef, $sformatf("%s: destination word %0d not leaked", what, w));
      end
      check(drop_irq && dropped == 16'(d0 + 1), "drop interrupt and count");
      @(negedge clk) drop_ack = 1'b1;
      @(negedge clk) drop_ack = 1'b0;
      check(!drop_irq, "drop interrupt acknowledged");
      n_drop++;
    end
  endtask

  initial begin
    string m;
    axi_resp_e r;
    data_t d;
    int t0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    sender.write(32'h0, 32'h0, 2'd0, r);
    receiver.write(32'h0, 32'h0, 2'd1, r);
    enable = 1'b1;

    transfer("{\"LabIV8E\": -2006, \"q3\": false, \"1CP\": 724.8507268121102, \"cOPY4K\": \"VwxslZatE\", \"2Mfz6\": 424}",
             1, "sample message");
    transfer("{\"a\": [1, 2,, 3]}", 0, "invalid JSON");
    transfer("{\"a\": [1, 2, 3]", 0, "truncated JSON");

    // Passthrough: even invalid JSON is delivered.
    mode = MODE_PASSTHROUGH;
    transfer("{\"a\": [1, 2,, 3]}", 1, "passthrough invalid JSON");
    n_thru++;
    mode = MODE_VALIDATE;

    // Illegal length: dropped without touching the payload.
    sender.write(32'h0, 32'h8000_0000, 2'd0, r);
    do sender.read(32'h0, 2'd0, d, r); while (d[31]);
    check(drop_irq, "zero length dropped");
    @(negedge clk) drop_ack = 1'b1;
    @(negedge clk) drop_ack = 1'b0;
    n_drop++;

    // Receiver has not emptied the destination: the validator must wait.
    receiver.write(32'h0, 32'h8000_0001, 2'd1, r);
    for (int w = 0; w < 2; w++) sender.write(addr_t'(4 + 4 * w), pack("[true]", w), 2'd0, r);
    sender.write(32'h0, 32'h8000_0006, 2'd0, r);
    repeat (200) @(negedge clk);
    sender.read(32'h0, 2'd0, d, r);
    check(d[31] && busy, "validator waits for the receiver");
    receiver.write(32'h0, 32'h0, 2'd1, r);
    do sender.read(32'h0, 2'd0, d, r); while (d[31]);
    receiver.read(32'h0, 2'd1, d, r);
    check(d == 32'h8000_0006, "message delivered after the receiver emptied the mailbox");
    receiver.write(32'h0, 32'h0, 2'd1, r);
    n_wait++;

    // Largest message of the evaluation: 1472 bytes.
    m = "[";
    while (m.len() < 1460) m = {m, "\"abcdefgh\","};
    m = {m, "0"};
    while (m.len() < 1471) m = {m, " "};
    m = {m, "]"};
    t0 = $time;
    transfer(m, ref_valid(m, 16), "1472-byte message");
    $display("1472-byte message round trip through the testbench: %0d clocks", ($time - t0) / 10);

    // Random messages of depth 1..15 and their mutations.
    for (int i = 0; i < 40; i++) begin
      m = gen_value(0, i % 15);
      transfer(m, ref_valid(m, 16), "random message");
      m[$urandom_range(0, m.len() - 1)] = "]";
      transfer(m, ref_valid(m, 16), "mutated message");
    end

    check(n_pass > 10 && n_drop > 10 && n_wait > 0 && n_thru > 0, "all paths exercised");
    $display("passed=%0d dropped=%0d waits=%0d passthrough=%0d", n_pass, n_drop, n_wait, n_thru);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
