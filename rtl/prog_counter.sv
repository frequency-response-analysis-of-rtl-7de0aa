// prog_counter: programmable counter that generates the memory-2 address.
//
// In the reference design the offset a - b for term k is computed during
// term k-1 and loaded as the start value of this counter; the counter then
// advances with the system clock in step with the up-counter, so at every
// count its value is address' = y1 + a - b and memory 2 is read "on the
// fly". When the comparator trips, the entry for the sensed count is already
// being read. address' is signed; here it is held with an offset of
// 2^(A2_W-1) so addr is an unsigned memory index, and the counter saturates
// at 0 and at the top instead of wrapping (offset and saturation are this
// design's choices).
// Timing: load (the PR strobe, last count of a term) sets addr for count 0
// of the next term on that clock edge; otherwise addr increments each clock.
module prog_counter #(
  parameter int unsigned A2_W = dpwm_pkg::A2_W_DEF,
  parameter int unsigned AB_W = dpwm_pkg::AB_W_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic signed [AB_W-1:0] a,
  input  logic signed [AB_W-1:0] b,
  output logic [A2_W-1:0]        addr
);
  localparam int BIAS = 1 << (A2_W - 1);
  localparam int TOP  = (1 << A2_W) - 1;

  int start;

  always_comb begin
    start = int'(a) - int'(b) + BIAS;
    if (start < 0)   start = 0;
    if (start > TOP) start = TOP;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                   addr <= A2_W'(BIAS);
    else if (load)                addr <= A2_W'(start);
    else if (addr != A2_W'(TOP))  addr <= addr + 1'b1;
  end
endmodule
