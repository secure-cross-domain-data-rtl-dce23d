// stl_bram: the shared memory of the Secure Transfer Link, a block RAM with
// two AXI4-Lite ports.
//
// Port A faces the processing system (through a Memory Guard), port B faces
// the Data Validator. Each port is an axil_mem_port, so each completes one
// transfer at a time: a write in two clocks (address+data, then B), a read in
// two clocks (address, then R). Both ports reach every word; when they write
// the same word in the same clock, port B's data is kept. Byte strobes are
// honoured. Word 0 is used by software and the Data Validator as the mailbox
// (see stl_pkg); the RAM itself gives it no special meaning.
//
// The RAM has no reset; a two-state simulation starts it at random contents,
// so software must write what it later reads. That the BRAM has two AXI
// memory-mapped sides follows the design description; its size (BYTES) is
// this implementation's choice, large enough for the mailbox word plus the
// largest 1472-byte message.
module stl_bram
  import stl_pkg::*;
#(
  parameter int unsigned BYTES = 4096
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t a_req,
  output axil_rsp_t a_rsp,
  input  axil_req_t b_req,
  output axil_rsp_t b_rsp
);

  localparam int unsigned WORDS   = BYTES / 4;
  localparam int unsigned WORD_AW = $clog2(WORDS);

  logic               a_en, a_we, b_en, b_we;
  strb_t              a_be, b_be;
  logic [WORD_AW-1:0] a_addr, b_addr;
  data_t              a_wdata, b_wdata, a_rdata, b_rdata;

  axil_mem_port #(.WORD_AW(WORD_AW)) u_port_a (
    .clk, .rst_n, .req(a_req), .rsp(a_rsp),
    .mem_en(a_en), .mem_we(a_we), .mem_be(a_be), .mem_addr(a_addr),
    .mem_wdata(a_wdata), .mem_rdata(a_rdata)
  );

  axil_mem_port #(.WORD_AW(WORD_AW)) u_port_b (
    .clk, .rst_n, .req(b_req), .rsp(b_rsp),
    .mem_en(b_en), .mem_we(b_we), .mem_be(b_be), .mem_addr(b_addr),
    .mem_wdata(b_wdata), .mem_rdata(b_rdata)
  );

  data_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en && !a_we) a_rdata <= mem[a_addr];
    if (b_en && !b_we) b_rdata <= mem[b_addr];
    for (int i = 0; i < 4; i++) begin
      if (a_en && a_we && a_be[i]) mem[a_addr][8*i +: 8] <= a_wdata[8*i +: 8];
      if (b_en && b_we && b_be[i]) mem[b_addr][8*i +: 8] <= b_wdata[8*i +: 8];
    end
  end

endmodule
