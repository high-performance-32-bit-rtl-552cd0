// aes_dpram: dual-port memory that buffers text between the bus and the AES
// processor.
//
// One write port and one read port on the same clock, both usable in the
// same cycle at different addresses. The read is registered: the word at
// raddr_i appears on rdata_o after the rising edge that sampled re_i, and
// rdata_o holds until the next read. Writing and reading one address in the
// same cycle returns the old word. Width and depth are this design's choice;
// the buffer itself is only named, not dimensioned, in the architecture.
module aes_dpram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     we_i,
  input  logic [$clog2(DEPTH)-1:0] waddr_i,
  input  logic [WIDTH-1:0]         wdata_i,
  input  logic                     re_i,
  input  logic [$clog2(DEPTH)-1:0] raddr_i,
  output logic [WIDTH-1:0]         rdata_o
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
    if (re_i) rdata_o <= mem[raddr_i];
  end

endmodule
