// tb_fifo1: end-to-end test of the asynchronous FIFO at its default size.
//
// The FIFO (8-bit words, 16 deep) runs with unrelated clocks: wclk period 8,
// rclk period 12 (later 4), with edges offset so the two never coincide. Traffic
// comes from the layered environment of fifo_tb_pkg: random words and write
// requests from the generator, a driver on the write interface, a
// receiving monitor on the read interface and a scoreboard that checks every
// word read against the words written, in order. Three phases are run: a fast
// writer against a slow reader (the FIFO fills and writes are refused), a slow
// writer against a fast reader (the FIFO runs dry and reads are refused),
// balanced traffic; then, with the read clock switched to twice the write
// clock, a fast writer and balanced traffic again.
//
// Beside the scoreboard, this module watches the ports and checks:
//  - the FIFO never overflows: wfull is high whenever all words are unread,
//  - it never underflows: rempty is high whenever no word is unread,
//  - the latency of a write into an empty FIFO: rempty falls on the third rclk
//    edge after the write (two synchronizer flops plus the registered flag),
//  - likewise wfull falls on the third wclk edge after a read from a full FIFO,
//  - the accepted-transfer counts agree with the environment's,
//  - the first three writes and reads use addresses 0, 1, 2 and Gray
//    pointers 00001, 00011, 00010 (printed as a transaction log),
//  - each mechanism happened: full, write refused, empty, read refused,
//    pointers wrapped, both latencies measured.
module tb_fifo1;

  localparam int unsigned DSIZE = fifo_pkg::FIFO_DSIZE;
  localparam int unsigned DEPTH = 1 << fifo_pkg::FIFO_ASIZE;

  logic wclk = 1'b0;
  logic rclk = 1'b0;

  // rclk half-period: 6 (slower than wclk) in the first phases, 2 (faster)
  // in the last ones. Both halves are even and rclk starts at an odd time, so
  // rclk edges stay on odd times and wclk edges on even times.
  int unsigned rhalf = 6;

  always #4 wclk = ~wclk;
  initial begin
    #1;
    forever #(rhalf) rclk = ~rclk;
  end

  fifo_wr_if wif (wclk);
  fifo_rd_if rif (rclk);

  fifo1 dut (
    .wclk   (wclk),
    .wrst_n (wif.wrst_n),
    .winc   (wif.winc),
    .wdata  (wif.wdata),
    .wfull  (wif.wfull),
    .rclk   (rclk),
    .rrst_n (rif.rrst_n),
    .rinc   (rif.rinc),
    .rdata  (rif.rdata),
    .rempty (rif.rempty)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Port-level bookkeeping, independent of the environment.
  int unsigned wr_cnt = 0, rd_cnt = 0;
  int unsigned full_events = 0, empty_events = 0;
  int unsigned wr_refused = 0, rd_refused = 0;
  int unsigned lat_measured = 0;
  int unsigned lat_edges = 0;
  bit          lat_active = 1'b0;
  int unsigned wlat_measured = 0;
  int unsigned wlat_edges = 0;
  bit          wlat_active = 1'b0;
  bit          prev_full = 1'b0, prev_empty = 1'b1;

  // Trace of the first three transactions on each side, as a log of
  // data, address and pointer values.
  localparam int unsigned TRACE_N = 3;
  localparam int unsigned PW = fifo_pkg::FIFO_ASIZE + 1;
  bit                w_trace = 1'b0, r_trace = 1'b0;
  int unsigned       w_trace_n, r_trace_n;
  logic [DSIZE-1:0]  w_trace_data, r_trace_data;
  int unsigned       w_trace_addr, r_trace_addr;

  function automatic logic [PW-1:0] gray_of(input int unsigned v);
    logic [PW-1:0] b, g;
    b = PW'(v);
    for (int i = 0; i < PW; i++) g[i] = (i == PW - 1) ? b[i] : (b[i] != b[i+1]);
    return g;
  endfunction

  always @(posedge wclk) begin
    if (wif.wrst_n) begin
      if (wif.winc && !wif.wfull) begin
        if (wr_cnt == rd_cnt && !lat_active) begin
          lat_active = 1'b1;
          lat_edges  = 0;
        end
        if (wr_cnt < TRACE_N) begin
          w_trace      = 1'b1;
          w_trace_n    = wr_cnt + 1;
          w_trace_data = wif.wdata;
          w_trace_addr = int'(dut.waddr);
        end
        wr_cnt++;
      end else if (wif.winc) begin
        wr_refused++;
      end
      if (wif.wfull && !prev_full) full_events++;
      if (wlat_active) wlat_edges++;
      prev_full = wif.wfull;
    end
  end

  always @(posedge rclk) begin
    if (rif.rrst_n) begin
      if (rif.rinc && !rif.rempty) begin
        if (wr_cnt - rd_cnt == DEPTH && !wlat_active) begin
          wlat_active = 1'b1;
          wlat_edges  = 0;
        end
        if (rd_cnt < TRACE_N) begin
          r_trace      = 1'b1;
          r_trace_n    = rd_cnt + 1;
          r_trace_data = rif.rdata;
          r_trace_addr = int'(dut.raddr);
        end
        rd_cnt++;
      end else if (rif.rinc) rd_refused++;
      if (rif.rempty && !prev_empty) empty_events++;
      prev_empty = rif.rempty;
      if (lat_active) lat_edges++;
    end
  end

  always @(negedge rclk) begin
    if (r_trace) begin
      r_trace = 1'b0;
      $display("read  transaction %0d: rdata=%b raddr=%b rptr=%b wq2_rptr=%b",
               r_trace_n, r_trace_data, fifo_pkg::FIFO_ASIZE'(r_trace_addr), dut.rptr, dut.wq2_rptr);
      check(r_trace_addr == r_trace_n - 1, "read transaction address");
      check(dut.rptr == gray_of(r_trace_n), "read transaction Gray pointer");
    end
    if (rif.rrst_n) begin
      if (wr_cnt == rd_cnt) check(rif.rempty, "rempty high when no word is unread");
      if (lat_active && !rif.rempty) begin
        check(lat_edges == 3, "rempty falls on the third rclk edge after a write");
        if (lat_edges != 3) $display("  measured %0d rclk edges", lat_edges);
        lat_measured++;
        lat_active = 1'b0;
      end
    end
  end

  always @(negedge wclk) begin
    if (w_trace) begin
      w_trace = 1'b0;
      $display("write transaction %0d: wdata=%b waddr=%b wptr=%b rq2_wptr=%b",
               w_trace_n, w_trace_data, fifo_pkg::FIFO_ASIZE'(w_trace_addr), dut.wptr, dut.rq2_wptr);
      check(w_trace_addr == w_trace_n - 1, "write transaction address");
      check(dut.wptr == gray_of(w_trace_n), "write transaction Gray pointer");
    end
    if (wif.wrst_n && wr_cnt - rd_cnt >= DEPTH)
      check(wif.wfull, "wfull high when every word holds unread data");
    if (wif.wrst_n && wlat_active && !wif.wfull) begin
      check(wlat_edges == 3, "wfull falls on the third wclk edge after a read");
      if (wlat_edges != 3) $display("  measured %0d wclk edges", wlat_edges);
      wlat_measured++;
      wlat_active = 1'b0;
    end
  end

  fifo_tb_pkg::environment env;

  initial begin
    env = new(wif, rif);
    env.launch();
    env.sb.verbose = 32;
    $display("phase 1: fast writer, slow reader");
    env.run(400, 100, 30);
    $display("phase 2: slow writer, fast reader");
    env.run(400, 25, 100);
    $display("phase 3: balanced traffic");
    env.run(400, 60, 60);
    rhalf = 2;
    $display("phase 4: read clock now twice the write clock; fast writer, slow reader");
    env.run(400, 100, 15);
    $display("phase 5: read clock faster; balanced traffic");
    env.run(400, 70, 40);
    env.report();

    checks   += env.sb.checks;
    failures += env.sb.failures;
    check(env.sb.checks == env.drv.sent, "every written word was read back");
    check(env.drv.sent == wr_cnt, "write count agrees with the port");
    check(env.mon.received == rd_cnt, "read count agrees with the port");
    check(full_events > 0, "mechanism: FIFO became full");
    check(wr_refused > 0, "mechanism: write refused while full");
    check(empty_events > 0, "mechanism: FIFO became empty after holding data");
    check(rd_refused > 0, "mechanism: read refused while empty");
    check(wr_cnt > 2 * DEPTH, "mechanism: pointers wrapped");
    check(lat_measured > 0, "mechanism: write into empty FIFO timed");
    check(wlat_measured > 0, "mechanism: read from full FIFO timed");
    $display("full=%0d write_refused=%0d empty=%0d read_refused=%0d words=%0d",
             full_events, wr_refused, empty_events, rd_refused, wr_cnt);
    $display("latency samples: write-to-not-empty=%0d read-to-not-full=%0d",
             lat_measured, wlat_measured);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge wclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
