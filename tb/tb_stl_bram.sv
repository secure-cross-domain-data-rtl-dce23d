// tb_stl_bram: self-checking testbench of the two-port shared BRAM.
//
// Writes random words and byte-strobed partial words through both ports,
// reads them back through the other port and compares with a model array
// kept in the testbench. Checks the two-clock read and write transfer time
// of a port and that port B wins when both ports write one word together.
module tb_stl_bram;
  import stl_pkg::*;

  localparam int unsigned BYTES = 1024;
  localparam int unsigned WORDS = BYTES / 4;

  logic clk = 1'b0, rst_n = 1'b0;
  axil_req_t a_req, b_req;
  axil_rsp_t a_rsp, b_rsp;

  int checks = 0, failures = 0;

  stl_bram #(.BYTES(BYTES)) dut (.*);
  axil_bfm bfm_a (.clk, .req(a_req), .rsp(a_rsp));
  axil_bfm bfm_b (.clk, .req(b_req), .rsp(b_rsp));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  data_t model [WORDS];
  bit    known [WORDS];

  initial begin
    data_t d;
    axi_resp_e r;
    int t0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int i = 0; i < 400; i++) begin
      int w;
      data_t v;
      strb_t s;
      w = $urandom_range(0, WORDS - 1);
      v = $urandom();
      s = known[w] ? strb_t'($urandom_range(1, 15)) : 4'hf;
      if ($urandom_range(0, 1)) bfm_a.write(addr_t'(w * 4), v, 2'd0, r, s);
      else                      bfm_b.write(addr_t'(w * 4), v, 2'd0, r, s);
      check(r == RESP_OKAY, "write response OKAY");
      for (int k = 0; k < 4; k++) if (s[k]) model[w][8*k +: 8] = v[8*k +: 8];
      known[w] = 1;
      w = $urandom_range(0, WORDS - 1);
      if (known[w]) begin
        if ($urandom_range(0, 1)) bfm_a.read(addr_t'(w * 4), 2'd0, d, r);
        else                      bfm_b.read(addr_t'(w * 4), 2'd0, d, r);
        check(d == model[w] && r == RESP_OKAY, $sformatf("word %0d read %h want %h", w, d, model[w]));
      end
    end

    // Transfer time: address accepted in the first clock, response in the second.
    @(negedge clk);
    t0 = $time;
    bfm_a.read(32'h10, 2'd0, d, r);
    check(($time - t0) == 30, $sformatf("read transfer time %0d", $time - t0));

    // Both ports write the same word in the same clock: port B's data stays.
    fork
      bfm_a.write(32'h20, 32'hAAAA_AAAA, 2'd0, r);
      bfm_b.write(32'h20, 32'h5555_5555, 2'd0, r);
    join
    bfm_a.read(32'h20, 2'd0, d, r);
    check(d == 32'h5555_5555, "port B wins a same-clock write");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
