// tb_cdc_fifo: checks the dual-clock FIFO with unrelated write and read clocks.
// Random pushes and pops; every popped word must equal the oldest pushed word (scoreboard
// queue). Also checks that a word pushed into an empty FIFO is visible within 4 read clocks,
// that the FIFO fills up (wready low) and that nothing is lost.
module tb_cdc_fifo;
  localparam int W = 24;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wvalid = 0, rready = 0, wready, rvalid;
  logic [W-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0, full_seen = 0, npop = 0, npush = 0;
  logic [W-1:0] q [$];

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  cdc_fifo #(.WIDTH(W), .AW(3)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    repeat (4) @(posedge wclk);
    wrst_n = 1;
    repeat (3000) begin
      @(negedge wclk);
      if (!(wvalid && !wready)) begin
        wvalid = ($urandom % 100) < 60;
        wdata  = W'($urandom);
      end
      @(posedge wclk);
      if (!wready) full_seen++;
      if (wvalid && wready) begin q.push_back(wdata); npush++; end
    end
    @(negedge wclk) wvalid = 0;
  end

  // reader
  initial begin
    repeat (4) @(posedge rclk);
    rrst_n = 1;
    forever begin
      @(negedge rclk);
      rready = (npush < 1500) ? (($urandom % 100) < 30) : (($urandom % 100) < 90);
      @(posedge rclk);
      if (rvalid && rready) begin
        checks++;
        if (q.size() == 0) begin failures++; $display("pop from empty"); end
        else begin
          logic [W-1:0] exp;
          exp = q.pop_front();
          if (rdata !== exp) begin failures++; $display("data %h exp %h", rdata, exp); end
        end
        npop++;
      end
    end
  end

  // latency: with the FIFO empty, one word must appear within 4 read clocks
  initial begin
    int lat;
    wait (npush > 0 && npop == npush && q.size() == 0);
    wait (wrst_n && rrst_n);
    #100000;
    wait (npop == npush);
    repeat (10) @(posedge rclk);
    @(negedge wclk); wvalid = 1; wdata = 24'h5a5a5a;
    q.push_back(24'h5a5a5a); npush++;   // empty FIFO: wready is high
    @(posedge wclk); #1;
    wvalid = 0;
    lat = 0;
    while (!rvalid && lat < 20) begin @(posedge rclk); lat++; end
    checks++;
    if (lat > 4) begin failures++; $display("latency %0d read clocks", lat); end
    repeat (20) @(posedge rclk);
    checks++;
    if (full_seen == 0) begin failures++; $display("FIFO never filled"); end
    checks++;
    if (npop != npush) begin failures++; $display("lost words: %0d pushed %0d popped", npush, npop); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
