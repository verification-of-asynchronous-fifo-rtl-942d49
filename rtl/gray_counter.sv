// gray_counter: dual-register n-bit Gray code counter.
//
// The counter keeps two registers, one holding the binary count and one holding
// the same count in Gray code. The binary register is incremented by an
// ordinary adder when inc is high; that next binary value goes back into the
// binary register and, through one XOR per bit, becomes the next Gray value,
// which is registered in the Gray register. This takes twice the flip-flops of
// a single Gray register but avoids a Gray-to-binary converter in the
// increment path. Both registered values change on the same clock edge, and
// the Gray value changes by exactly one bit per increment, so it may be
// sampled from another clock domain.
//
// Interface: clk, rst_n (asynchronous, active low, clears both registers), inc
// (increment this cycle). bin/gray are the registered count; bnext/gnext are
// the values they take at the next edge, exposed so flag logic can compare
// against the next pointer.
//
// Timing: bin and gray update one clock after inc is seen high; bnext and gnext
// are combinational from the registers and inc.
//
// The dual-register structure follows the described pointer counter; the
// reset value of zero is the described pointer reset, the separate module is
// this design's choice.
module gray_counter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         inc,
  output logic [N-1:0] bin,
  output logic [N-1:0] gray,
  output logic [N-1:0] bnext,
  output logic [N-1:0] gnext
);

  assign bnext = bin + N'(inc);
  assign gnext = (bnext >> 1) ^ bnext;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin  <= '0;
      gray <= '0;
    end else begin
      bin  <= bnext;
      gray <= gnext;
    end
  end

  // A Gray pointer crosses clock domains: it must never change in more than
  // one bit per clock. Only steps between two cycles out of reset count.
  a_one_bit_step: assert property (@(posedge clk) disable iff (!rst_n)
    $past(rst_n) |-> $countones(gray ^ $past(gray)) <= 1);

endmodule
