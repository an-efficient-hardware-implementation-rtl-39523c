// dp_bram: true dual-port block RAM used as a DATA BRAM of a processing
// element (one 128-coefficient bank).
//
// Two independent ports, each with its own address, write enable and data.
// Reads are synchronous: rdata shows the word at the address of the previous
// cycle (read-first when the same port writes). Both ports may write in the
// same cycle as long as the addresses differ; the address generator never
// makes them collide. Contents are not reset, as in a block RAM.
module dp_bram #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 12,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr_a,
  input  logic             we_a,
  input  logic [WIDTH-1:0] wdata_a,
  output logic [WIDTH-1:0] rdata_a,
  input  logic [AW-1:0]    addr_b,
  input  logic             we_b,
  input  logic [WIDTH-1:0] wdata_b,
  output logic [WIDTH-1:0] rdata_b
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= wdata_a;
    rdata_a <= mem[addr_a];
  end

  always_ff @(posedge clk) begin
    if (we_b) mem[addr_b] <= wdata_b;
    rdata_b <= mem[addr_b];
  end
endmodule
