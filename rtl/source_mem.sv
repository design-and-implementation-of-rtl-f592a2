// source_mem: source memory with its address counter.
//
// Holds the input operands of a run. Each 'fetch' pulse (the controller's
// temp1) reads the word at the address counter and advances the counter;
// the word appears on 'data' with 'valid' high for one cycle, one clock
// after the pulse. A fetch at or beyond 'len' reads nothing and only
// raises 'exhausted', which tells the controller that the data has ceased.
// The load port writes words before a run; 'rewind' returns the address
// counter to 0. DEPTH defaults to 256 words of W = 8 bits, enough for the
// 0..255 test data set.
//
// Memory plus address counter stepped by temp1 follow the original design;
// the load port, 'len'/'exhausted' and 'rewind' are choices of this design.
module source_mem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned W     = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  // load port
  input  logic         ld_en,
  input  logic [AW-1:0] ld_addr,
  input  logic [W-1:0] ld_data,
  input  logic [AW:0]  len,       // number of valid words, 0..DEPTH
  input  logic         rewind,
  // read side, driven by the controller
  input  logic         fetch,
  output logic [W-1:0] data,
  output logic         valid,
  output logic         exhausted,
  output logic [AW:0]  addr
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (ld_en) mem[ld_addr] <= ld_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      addr      <= '0;
      data      <= '0;
      valid     <= 1'b0;
      exhausted <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (rewind) begin
        addr      <= '0;
        exhausted <= 1'b0;
      end else if (fetch) begin
        if (addr < len) begin
          data  <= mem[addr[AW-1:0]];
          valid <= 1'b1;
          addr  <= addr + 1'b1;
        end else begin
          exhausted <= 1'b1;
        end
      end
    end

endmodule
