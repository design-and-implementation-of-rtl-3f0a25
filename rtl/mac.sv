// mac: accumulator of the multiply-accumulate path. Each clock edge with
// en = 1 adds the incoming product to the accumulator:
//   clr = 1          : acc <= 0
//   else en = 1      : acc <= acc + product   (modulo 2^P)
//   else             : acc holds
// The product comes from the Vedic multiplier outside this block, so a
// product presented in one cycle is in acc after the next rising edge (one
// cycle of latency, one accumulation per cycle). rst_n is an asynchronous,
// active-low reset that clears acc. The adder is a P-bit ripple carry adder.
// The source names the MAC and says it uses the Vedic multiplier; the
// accumulator width (one product wide, wrapping), clear, enable and reset
// are this design's choices.
module mac #(
  parameter int unsigned P = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [P-1:0] product,
  output logic [P-1:0] acc
);
  logic [P-1:0] acc_next;
  logic         co;   // carry past the accumulator width is discarded (wrap)

  rca #(.W(P)) u_acc_add (
    .a(acc), .b(product), .cin(1'b0), .sum(acc_next), .cout(co)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (clr) acc <= '0;
    else if (en)  acc <= acc_next;
  end
endmodule
