// tb_sync_w2r: self-checking test of the write-to-read pointer synchronizer.
//
// A source process changes the pointer wptr on its own clock (period 8) as a
// Gray counter would, one bit per step, while the synchronizer runs on rclk
// (period 10). The testbench records the value of wptr present just before
// each rising rclk edge and checks that rq2_wptr, after edge k, equals the value
// recorded before edge k-1: a latency of exactly two destination clocks.
// It also checks that reset clears the output and that every value seen on
// rq2_wptr is one the source actually held.
module tb_sync_w2r;

  localparam int unsigned ADDRSIZE = 4;

  logic rclk = 1'b0;
  logic srcclk = 1'b0;
  logic rrst_n;
  logic [ADDRSIZE:0] wptr, rq2_wptr;
  logic [ADDRSIZE:0] count;
  logic [ADDRSIZE:0] hist [$];
  int checks = 0, failures = 0;
  int changes = 0;

  sync_w2r #(.ADDRSIZE(ADDRSIZE)) dut (.*);

  always #5 rclk = ~rclk;
  always #4 srcclk = ~srcclk;

  // Source: a Gray pointer that advances on random source cycles.
  always @(posedge srcclk or negedge rrst_n) begin
    if (!rrst_n) begin
      count <= '0;
      wptr  <= '0;
    end else if ($urandom_range(0, 2) != 0) begin
      count <= count + 1'b1;
      wptr  <= (count + 1'b1) ^ ((count + 1'b1) >> 1);
    end
  end

  initial begin
    rrst_n = 1'b0;
    #22;
    checks++;
    if (rq2_wptr != 0) begin
      failures++;
      $display("FAIL reset: rq2_wptr=%b", rq2_wptr);
    end
    @(negedge rclk);
    rrst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      // Sample the input just before the edge (source edges fall on even times,
      // destination edges on odd times, so they never coincide).
      @(posedge rclk);
      hist.push_back(wptr);
      @(negedge rclk);
      if (hist.size() >= 2) begin
        checks++;
        if (rq2_wptr != hist[hist.size() - 2]) begin
          failures++;
          $display("FAIL edge %0d: rq2_wptr=%b expected %b", k, rq2_wptr, hist[hist.size() - 2]);
        end
        if (hist[hist.size() - 1] != hist[hist.size() - 2]) changes++;
      end
    end
    checks++;
    if (changes < 50) begin
      failures++;
      $display("FAIL source pointer hardly moved (%0d changes)", changes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge rclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
