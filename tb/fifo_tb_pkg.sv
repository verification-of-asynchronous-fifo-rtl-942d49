// fifo_tb_pkg: layered verification environment for the asynchronous FIFO.
//
// transaction  one write-side cycle: whether to request a write, and the word.
// generator    makes random transactions and puts them in mailbox mbx.
// driver       takes transactions from mbx and drives the write interface, one
//              per wclk cycle; a refused write (FIFO full) is offered again
//              until accepted. Every accepted word goes to the scoreboard
//              through mailbox drv2sb.
// monitor      the receiver: raises rinc on random rclk cycles and passes every
//              word actually read to the scoreboard through mailbox mon2sb.
// scoreboard   compares the two streams word by word, in order.
// environment  build() makes the mailboxes and the components; reset() resets
//              both sides; launch() does both and starts the monitor and the
//              scoreboard in the background; start() runs one traffic phase
//              through generator and driver; wait_for_end() lets the reader
//              drain the FIFO until every accepted word has been compared;
//              run() is start() then wait_for_end(); report() prints totals.
// The read requests are made by the monitor, in the read clock domain, rather
// than carried in the write-side transaction.
// Percentages set how often each side asks to transfer, so one run can keep
// the FIFO mostly full (fast writer) and another mostly empty (fast reader).
package fifo_tb_pkg;

  localparam int unsigned DSIZE = fifo_pkg::FIFO_DSIZE;

  class transaction;
    bit             winc;
    bit [DSIZE-1:0] wdata;

    function void make(int unsigned write_pct);
      winc  = ($urandom_range(0, 99) < write_pct);
      wdata = DSIZE'($urandom);
    endfunction
  endclass

  class generator;
    mailbox #(transaction) mbx;
    int unsigned           count;
    int unsigned           write_pct;

    function new(mailbox #(transaction) mbx);
      this.mbx = mbx;
    endfunction

    task run();
      for (int unsigned i = 0; i < count; i++) begin
        transaction tr = new();
        tr.make(write_pct);
        mbx.put(tr);
      end
    endtask
  endclass

  class driver;
    virtual fifo_wr_if.DRV  vif;
    mailbox #(transaction)  mbx;
    mailbox #(bit [DSIZE-1:0]) drv2sb;
    int unsigned            sent;
    int unsigned            refused;
    int unsigned            todo;

    function new(virtual fifo_wr_if.DRV vif, mailbox #(transaction) mbx,
                 mailbox #(bit [DSIZE-1:0]) drv2sb);
      this.vif    = vif;
      this.mbx    = mbx;
      this.drv2sb = drv2sb;
    endfunction

    task reset();
      vif.wrst_n = 1'b0;
      vif.winc   = 1'b0;
      vif.wdata  = '0;
      repeat (3) @(negedge vif.wclk);
      vif.wrst_n = 1'b1;
    endtask

    // Inputs change on the falling edge; wfull is stable there and equals the
    // value the FIFO sees at the next rising edge.
    task run();
      for (int unsigned i = 0; i < todo; i++) begin
        transaction tr;
        mbx.get(tr);
        @(negedge vif.wclk);
        vif.winc  = tr.winc;
        vif.wdata = tr.wdata;
        if (tr.winc) begin
          while (vif.wfull) begin
            refused++;
            @(negedge vif.wclk);
          end
          drv2sb.put(tr.wdata);
          sent++;
        end
      end
      @(negedge vif.wclk);
      vif.winc = 1'b0;
    endtask
  endclass

  class monitor;
    virtual fifo_rd_if.MON  vif;
    mailbox #(bit [DSIZE-1:0]) mon2sb;
    int unsigned            read_pct;
    int unsigned            received;
    int unsigned            refused;
    bit                     stop;

    function new(virtual fifo_rd_if.MON vif, mailbox #(bit [DSIZE-1:0]) mon2sb);
      this.vif    = vif;
      this.mon2sb = mon2sb;
    endfunction

    task reset();
      vif.rrst_n = 1'b0;
      vif.rinc   = 1'b0;
      repeat (3) @(negedge vif.rclk);
      vif.rrst_n = 1'b1;
    endtask

    // rdata and rempty are stable on the falling edge: a read requested here
    // with rempty low takes the word now on rdata at the next rising edge.
    task run();
      while (!stop) begin
        @(negedge vif.rclk);
        vif.rinc = ($urandom_range(0, 99) < read_pct);
        if (vif.rinc && !vif.rempty) begin
          mon2sb.put(vif.rdata);
          received++;
        end else if (vif.rinc) begin
          refused++;
        end
      end
      vif.rinc = 1'b0;
    endtask
  endclass

  class scoreboard;
    mailbox #(bit [DSIZE-1:0]) drv2sb;
    mailbox #(bit [DSIZE-1:0]) mon2sb;
    int unsigned checks;
    int unsigned failures;
    int unsigned verbose;

    function new(mailbox #(bit [DSIZE-1:0]) drv2sb, mailbox #(bit [DSIZE-1:0]) mon2sb);
      this.drv2sb = drv2sb;
      this.mon2sb = mon2sb;
    endfunction

    task run();
      bit [DSIZE-1:0] exp, act;
      forever begin
        mon2sb.get(act);
        checks++;
        if (drv2sb.try_get(exp) == 0) begin
          failures++;
          $display("FAIL read %h with nothing written", act);
        end else if (exp != act) begin
          failures++;
          $display("FAIL word %0d: expected wdata=%h, rdata=%h", checks, exp, act);
        end else if (checks <= verbose) begin
          $display("checking rdata: expected wdata = %h, rdata = %h", exp, act);
        end
      end
    endtask
  endclass

  class environment;
    virtual fifo_wr_if.DRV      wvif;
    virtual fifo_rd_if.MON      rvif;
    mailbox #(transaction)      mbx;
    mailbox #(bit [DSIZE-1:0])  drv2sb;
    mailbox #(bit [DSIZE-1:0])  mon2sb;
    generator                   gen;
    driver                      drv;
    monitor                     mon;
    scoreboard                  sb;

    function new(virtual fifo_wr_if.DRV wvif, virtual fifo_rd_if.MON rvif);
      this.wvif = wvif;
      this.rvif = rvif;
    endfunction

    function void build();
      mbx    = new();
      drv2sb = new();
      mon2sb = new();
      gen    = new(mbx);
      drv    = new(wvif, mbx, drv2sb);
      mon    = new(rvif, mon2sb);
      sb     = new(drv2sb, mon2sb);
    endfunction

    task reset();
      fork
        drv.reset();
        mon.reset();
      join
    endtask

    // One traffic phase: count write-side cycles, with the given write and
    // read request rates.
    task start(int unsigned count, int unsigned write_pct, int unsigned read_pct);
      gen.count     = count;
      gen.write_pct = write_pct;
      drv.todo      = count;
      mon.read_pct  = read_pct;
      fork
        gen.run();
        drv.run();
      join
    endtask

    // Wait until every accepted word has been read back and compared.
    task wait_for_end();
      mon.read_pct = 100;
      while (sb.checks < drv.sent) @(negedge rvif.rclk);
      repeat (4) @(negedge rvif.rclk);
    endtask

    function void report();
      $display("environment: written=%0d read=%0d compared=%0d mismatches=%0d",
               drv.sent, mon.received, sb.checks, sb.failures);
      $display("environment: writes refused (full)=%0d reads refused (empty)=%0d",
               drv.refused, mon.refused);
    endfunction

    task run(int unsigned count, int unsigned write_pct, int unsigned read_pct);
      start(count, write_pct, read_pct);
      wait_for_end();
    endtask

    // build, reset, then the monitor and scoreboard run in the background
    // while each phase starts and drains.
    task launch();
      build();
      reset();
      fork
        mon.run();
        sb.run();
      join_none
    endtask
  endclass

endpackage
