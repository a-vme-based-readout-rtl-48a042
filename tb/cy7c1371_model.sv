// cy7c1371_model: behavioural model of a synchronous flow-through SRAM
// (512K x 36), for testbenches only. The address and write enable are
// registered on the rising clock; a write stores `d` at that edge; read
// data of the registered address appear after the edge and are held
// until the next one.
module cy7c1371_model #(
  parameter int unsigned AW = 19,
  parameter int unsigned DW = 36
) (
  input  logic          clk,
  input  logic [AW-1:0] a,
  input  logic          we,
  input  logic [DW-1:0] d,
  output logic [DW-1:0] q
);
  logic [DW-1:0] mem [2**AW];
  logic [AW-1:0] a_q;
  always_ff @(posedge clk) begin
    a_q <= a;
    if (we) mem[a] <= d;
  end
  assign q = mem[a_q];
endmodule
