// tb_rptr_empty: self-checking test of the read pointer and empty flag.
//
// The testbench plays the write side: it keeps a binary count of words
// written (wcount, never more than 16 ahead of the reads) and drives rq2_wptr
// with its Gray code, changing it only between rclk edges. It issues random
// read requests. A reference model counts accepted reads (rinc while the
// FIFO shows not empty) in binary and predicts, after each rclk edge, raddr
// (read count modulo 16), rptr (Gray code of the read count, computed bit by
// bit) and rempty (read count equal to write count, compared in binary). This
// checks the flag's one-edge timing: rempty after an edge already reflects the
// read accepted at that edge. It also counts reads refused while empty and
// pointer wraps, and fails if either never happened.
module tb_rptr_empty;

  localparam int unsigned ADDRSIZE = 4;
  localparam int unsigned DEPTH    = 1 << ADDRSIZE;

  logic rclk = 1'b0;
  logic rrst_n;
  logic rinc;
  logic [ADDRSIZE:0]   rq2_wptr, rptr;
  logic [ADDRSIZE-1:0] raddr;
  logic                rempty;

  int checks = 0, failures = 0;
  int unsigned wcount = 0, rcount = 0;
  int refused = 0, accepted = 0;
  bit exp_empty;

  rptr_empty #(.ADDRSIZE(ADDRSIZE)) dut (.*);

  always #5 rclk = ~rclk;

  function automatic logic [ADDRSIZE:0] to_gray(input int unsigned v);
    logic [ADDRSIZE:0] b, g;
    b = (ADDRSIZE + 1)'(v);
    for (int i = 0; i <= ADDRSIZE; i++) g[i] = (i == ADDRSIZE) ? b[i] : (b[i] != b[i+1]);
    return g;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: rcount=%0d wcount=%0d raddr=%0d rptr=%b rempty=%b",
               what, rcount, wcount, raddr, rptr, rempty);
    end
  endtask

  initial begin
    rrst_n = 1'b0; rinc = 1'b0; rq2_wptr = '0;
    #12;
    check(rempty == 1'b1 && rptr == 0 && raddr == 0, "reset state");
    @(negedge rclk);
    rrst_n = 1'b1;
    for (int cyc = 0; cyc < 1500; cyc++) begin
      // Phases alternate between a fast writer and a fast reader.
      if (((cyc / 100) % 2) == 0) begin
        if ($urandom_range(0, 3) != 0 && wcount - rcount < DEPTH) wcount++;
        rinc = ($urandom_range(0, 3) == 0);
      end else begin
        if ($urandom_range(0, 3) == 0 && wcount - rcount < DEPTH) wcount++;
        rinc = ($urandom_range(0, 3) != 0);
      end
      rq2_wptr = to_gray(wcount);
      @(posedge rclk);
      if (rinc && !rempty) begin
        rcount++;
        accepted++;
      end else if (rinc) begin
        refused++;
      end
      exp_empty = (rcount == wcount);
      @(negedge rclk);
      check(raddr == ADDRSIZE'(rcount), "raddr");
      check(rptr == to_gray(rcount), "rptr");
      check(rempty == exp_empty, "rempty");
    end
    check(refused > 0, "a read was refused while empty");
    check(rcount > 2 * DEPTH, "the read pointer wrapped");
    $display("reads accepted=%0d refused=%0d", accepted, refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge rclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
