// ram2: two-port RAM of DEPTH words of WIDTH bits, one of the FFT's two data
// buffers.
//
// Both ports are read/write and share one write enable, so a butterfly can read
// its two operands (A and B) in the same cycle, or write its two results in the
// same cycle. Reads are asynchronous (the word at the address appears in the
// same cycle); writes happen at the rising clock edge when we is high, port A's
// word at adr_a and port B's word at adr_b. If both ports write the same
// address, port B wins. The FFT never does that.
//
// Size (32 x 32 bits), the shared write enable and the asynchronous read follow
// the design description; the port-B-wins rule is this implementation's choice.
module ram2 #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    adr_a,
  input  logic [AW-1:0]    adr_b,
  input  logic [WIDTH-1:0] wd_a,
  input  logic [WIDTH-1:0] wd_b,
  output logic [WIDTH-1:0] rd_a,
  output logic [WIDTH-1:0] rd_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[adr_a] <= wd_a;
      mem[adr_b] <= wd_b;
    end
  end

  assign rd_a = mem[adr_a];
  assign rd_b = mem[adr_b];

endmodule
