// test_mem: behavioural two-port memory for the processor testbenches.
// Not a design block: it stands for the system memory, which answers each
// request combinationally within the cycle. Port 0 and port 1 read
// combinationally; a write request is performed at the rising clock edge
// (port 1 after port 0). Words are addressed by addr[2 +: log2(WORDS)].
module test_mem
  import parc_pkg::*;
#(
  parameter int WORDS = 4096
) (
  input  logic      clk,
  input  mem_req_t  req0,
  output mem_resp_t resp0,
  input  mem_req_t  req1,
  output mem_resp_t resp1
);

  localparam int AW = $clog2(WORDS);

  word_t mem [WORDS];

  assign resp0.data = mem[req0.addr[2 +: AW]];
  assign resp1.data = mem[req1.addr[2 +: AW]];

  always @(posedge clk) begin
    if (req0.val && req0.op == MEM_WRITE) mem[req0.addr[2 +: AW]] <= req0.data;
    if (req1.val && req1.op == MEM_WRITE) mem[req1.addr[2 +: AW]] <= req1.data;
  end

endmodule
