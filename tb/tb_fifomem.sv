// tb_fifomem: self-checking test of the FIFO storage array.
//
// Writes random words to random addresses with random wclken and wfull, keeps
// a reference copy of what should be stored (a write counts only with wclken
// high and wfull low), and after each write reads every address through the
// asynchronous read port, checking rdata without any clock edge on the read
// side. Also checks that rdata follows a change of raddr in zero clocks.
module tb_fifomem;

  localparam int unsigned DATASIZE = 8;
  localparam int unsigned ADDRSIZE = 4;
  localparam int unsigned DEPTH    = 1 << ADDRSIZE;

  logic wclk = 1'b0;
  logic wclken, wfull;
  logic [ADDRSIZE-1:0] waddr, raddr;
  logic [DATASIZE-1:0] wdata, rdata;

  logic [DATASIZE-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;
  int blocked = 0;

  fifomem #(.DATASIZE(DATASIZE), .ADDRSIZE(ADDRSIZE)) dut (.*);

  always #5 wclk = ~wclk;

  initial begin
    wclken = 1'b0; wfull = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    // Fill every word once so the reference is complete.
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge wclk);
      wclken = 1'b1; wfull = 1'b0; waddr = ADDRSIZE'(a); wdata = DATASIZE'($urandom);
      ref_mem[a] = wdata;
    end
    for (int n = 0; n < 300; n++) begin
      @(negedge wclk);
      wclken = ($urandom_range(0, 3) != 0);
      wfull  = ($urandom_range(0, 3) == 0);
      waddr  = ADDRSIZE'($urandom);
      wdata  = DATASIZE'($urandom);
      if (wclken && !wfull) ref_mem[waddr] = wdata;
      else if (wclken) blocked++;
      @(posedge wclk);
      #1;
      wclken = 1'b0;
      for (int a = 0; a < DEPTH; a++) begin
        raddr = ADDRSIZE'(a);
        #1;
        checks++;
        if (rdata !== ref_mem[a]) begin
          failures++;
          $display("FAIL addr %0d: rdata=%h expected %h", a, rdata, ref_mem[a]);
        end
      end
    end
    checks++;
    if (blocked == 0) begin
      failures++;
      $display("FAIL no write was blocked by wfull");
    end
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
