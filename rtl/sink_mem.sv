// sink_mem: sink memory with its address counter.
//
// Each 'store' pulse (the controller's temp2) writes 'wdata' at the address
// counter and advances it, so results land in the order they are stored.
// 'rewind' returns the counter to 0. 'rd_addr'/'rd_data' is an asynchronous
// read port for whoever collects the results; 'count' is the number of
// words stored so far. DEPTH defaults to 256 words; W = 17 bits holds the
// sum of two 16-bit products.
//
// Memory plus address counter stepped by temp2 follow the original design;
// the read port, 'count' and 'rewind' are choices of this design.
module sink_mem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned W     = 17,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rewind,
  input  logic          store,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data,
  output logic [AW:0]   count
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (store && !rewind) mem[count[AW-1:0]] <= wdata;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      count <= '0;
    else if (rewind) count <= '0;
    else if (store && count < (AW+1)'(DEPTH)) count <= count + 1'b1;

  assign rd_data = mem[rd_addr];

endmodule
