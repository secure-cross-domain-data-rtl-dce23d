// axil_bfm: testbench AXI4-Lite manager with blocking write and read tasks.
//
// Signals change on the falling clock edge; a handshake is taken at a rising
// edge when READY, which may depend combinationally on VALID, is seen high
// one time unit after the falling edge. The user field carries the issuing
// CPU core number.
module axil_bfm
  import stl_pkg::*;
(
  input  logic      clk,
  output axil_req_t req,
  input  axil_rsp_t rsp
);

  initial req = '0;

  task automatic write(input addr_t addr, input data_t data, input user_t core,
                       output axi_resp_e resp, input strb_t strb = '1);
    bit aw_done, w_done;
    @(negedge clk);
    req.aw_valid = 1'b1; req.aw_addr = addr; req.aw_user = core;
    req.w_valid  = 1'b1; req.w_data  = data; req.w_strb  = strb;
    aw_done = 0; w_done = 0;
    while (!(aw_done && w_done)) begin
      #1;
      if (req.aw_valid && rsp.aw_ready) aw_done = 1;
      if (req.w_valid && rsp.w_ready) w_done = 1;
      @(negedge clk);
      if (aw_done) req.aw_valid = 1'b0;
      if (w_done)  req.w_valid  = 1'b0;
    end
    req.b_ready = 1'b1;
    forever begin
      #1;
      if (rsp.b_valid) begin
        resp = rsp.b_resp;
        @(negedge clk);
        break;
      end
      @(negedge clk);
    end
    req.b_ready = 1'b0;
  endtask

  task automatic read(input addr_t addr, input user_t core,
                      output data_t data, output axi_resp_e resp);
    @(negedge clk);
    req.ar_valid = 1'b1; req.ar_addr = addr; req.ar_user = core;
    forever begin
      #1;
      if (rsp.ar_ready) begin
        @(negedge clk);
        break;
      end
      @(negedge clk);
    end
    req.ar_valid = 1'b0;
    req.r_ready  = 1'b1;
    forever begin
      #1;
      if (rsp.r_valid) begin
        data = rsp.r_data;
        resp = rsp.r_resp;
        @(negedge clk);
        break;
      end
      @(negedge clk);
    end
    req.r_ready = 1'b0;
  endtask

endmodule
