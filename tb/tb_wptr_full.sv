// tb_wptr_full: self-checking test of the write pointer and full flag.
//
// The testbench plays the read side: it keeps a binary count of words read
// (rcount, never ahead of the writes) and drives wq2_rptr with its Gray code,
// changing it only between wclk edges. It issues random write requests. A
// reference model counts accepted writes (winc while the FIFO shows not full)
// in binary and predicts, after each wclk edge, waddr (write count modulo 16),
// wptr (Gray code of the write count, computed bit by bit) and wfull (write
// count exactly 16 ahead of the read count, compared in binary, not by the
// MSB-inversion trick the design uses). It counts writes refused while full
// and pointer wraps, and fails if either never happened.
module tb_wptr_full;

  localparam int unsigned ADDRSIZE = 4;
  localparam int unsigned DEPTH    = 1 << ADDRSIZE;

  logic wclk = 1'b0;
  logic wrst_n;
  logic winc;
  logic [ADDRSIZE:0]   wq2_rptr, wptr;
  logic [ADDRSIZE-1:0] waddr;
  logic                wfull;

  int checks = 0, failures = 0;
  int unsigned wcount = 0, rcount = 0;
  int refused = 0, accepted = 0;
  bit exp_full;

  wptr_full #(.ADDRSIZE(ADDRSIZE)) dut (.*);

  always #5 wclk = ~wclk;

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
      $display("FAIL %s: wcount=%0d rcount=%0d waddr=%0d wptr=%b wfull=%b",
               what, wcount, rcount, waddr, wptr, wfull);
    end
  endtask

  initial begin
    wrst_n = 1'b0; winc = 1'b0; wq2_rptr = '0;
    #12;
    check(wfull == 1'b0 && wptr == 0 && waddr == 0, "reset state");
    @(negedge wclk);
    wrst_n = 1'b1;
    for (int cyc = 0; cyc < 1500; cyc++) begin
      // Phases alternate between a fast reader and a fast writer.
      if (((cyc / 100) % 2) == 0) begin
        if ($urandom_range(0, 3) == 0 && rcount < wcount) rcount++;
        winc = ($urandom_range(0, 3) != 0);
      end else begin
        if ($urandom_range(0, 3) != 0 && rcount < wcount) rcount++;
        winc = ($urandom_range(0, 3) == 0);
      end
      wq2_rptr = to_gray(rcount);
      @(posedge wclk);
      if (winc && !wfull) begin
        wcount++;
        accepted++;
      end else if (winc) begin
        refused++;
      end
      exp_full = (wcount - rcount == DEPTH);
      @(negedge wclk);
      check(waddr == ADDRSIZE'(wcount), "waddr");
      check(wptr == to_gray(wcount), "wptr");
      check(wfull == exp_full, "wfull");
    end
    check(refused > 0, "a write was refused while full");
    check(wcount > 2 * DEPTH, "the write pointer wrapped");
    $display("writes accepted=%0d refused=%0d", accepted, refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge wclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
