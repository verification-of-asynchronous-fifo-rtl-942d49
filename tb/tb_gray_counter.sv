// tb_gray_counter: self-checking test of the dual-register Gray counter.
//
// Drives random increment requests for several full wraps of a 5-bit counter.
// A reference binary count kept in the testbench gives the expected binary
// value; the expected Gray value is computed bit by bit (g[i] = b[i] xor
// b[i+1]) independently of the counter's XOR network. Checks, after every
// clock: bin, gray, and the combinational next values bnext/gnext; that the
// count changes in the same cycle inc is seen (one-cycle latency); and that
// the Gray value never changes in more than one bit.
module tb_gray_counter;

  localparam int unsigned N = 5;

  logic clk = 1'b0;
  logic rst_n;
  logic inc;
  logic [N-1:0] bin, gray, bnext, gnext;

  int checks = 0, failures = 0;
  logic [N-1:0] ref_bin;
  logic [N-1:0] prev_gray;

  gray_counter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] to_gray(input logic [N-1:0] b);
    logic [N-1:0] g;
    for (int i = 0; i < N; i++) g[i] = (i == N - 1) ? b[i] : (b[i] != b[i+1]);
    return g;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: bin=%0d gray=%b ref=%0d", what, bin, gray, ref_bin);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    inc   = 1'b0;
    ref_bin = '0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    check(bin == 0 && gray == 0, "reset value");
    prev_gray = gray;
    for (int cyc = 0; cyc < 400; cyc++) begin
      inc = ($urandom_range(0, 3) != 0);
      #1;
      check(bnext == N'(ref_bin + N'(inc)), "bnext");
      check(gnext == to_gray(N'(ref_bin + N'(inc))), "gnext");
      @(posedge clk);
      if (inc) ref_bin = ref_bin + 1'b1;
      @(negedge clk);
      check(bin == ref_bin, "binary count");
      check(gray == to_gray(ref_bin), "gray count");
      check($countones(gray ^ prev_gray) <= 1, "single-bit step");
      prev_gray = gray;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
