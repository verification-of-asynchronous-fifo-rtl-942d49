// tb_sync_r2w: self-checking test of the read-to-write pointer synchronizer.
//
// A source process changes the pointer rptr on its own clock (period 8) as a
// Gray counter would, one bit per step, while the synchronizer runs on wclk
// (period 10). The testbench records the value of rptr present just before
// each rising wclk edge and checks that wq2_rptr, after edge k, equals the value
// recorded before edge k-1: a latency of exactly two destination clocks.
// It also checks that reset clears the output and that every value seen on
// wq2_rptr is one the source actually held.
module tb_sync_r2w;

  localparam int unsigned ADDRSIZE = 4;

  logic wclk = 1'b0;
  logic srcclk = 1'b0;
  logic wrst_n;
  logic [ADDRSIZE:0] rptr, wq2_rptr;
  logic [ADDRSIZE:0] count;
  logic [ADDRSIZE:0] hist [$];
  int checks = 0, failures = 0;
  int changes = 0;

  sync_r2w #(.ADDRSIZE(ADDRSIZE)) dut (.*);

  always #5 wclk = ~wclk;
  always #4 srcclk = ~srcclk;

  // Source: a Gray pointer that advances on random source cycles.
  always @(posedge srcclk or negedge wrst_n) begin
    if (!wrst_n) begin
      count <= '0;
      rptr  <= '0;
    end else if ($urandom_range(0, 2) != 0) begin
      count <= count + 1'b1;
      rptr  <= (count + 1'b1) ^ ((count + 1'b1) >> 1);
    end
  end

  initial begin
    wrst_n = 1'b0;
    #22;
    checks++;
    if (wq2_rptr != 0) begin
      failures++;
      $display("FAIL reset: wq2_rptr=%b", wq2_rptr);
    end
    @(negedge wclk);
    wrst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      // Sample the input just before the edge (source edges fall on even times,
      // destination edges on odd times, so they never coincide).
      @(posedge wclk);
      hist.push_back(rptr);
      @(negedge wclk);
      if (hist.size() >= 2) begin
        checks++;
        if (wq2_rptr != hist[hist.size() - 2]) begin
          failures++;
          $display("FAIL edge %0d: wq2_rptr=%b expected %b", k, wq2_rptr, hist[hist.size() - 2]);
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
    repeat (2000) @(posedge wclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
