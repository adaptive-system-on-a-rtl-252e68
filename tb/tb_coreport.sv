// tb_coreport: writer and reader on unrelated clocks (10 ns and 7 ns, then
// 6 ns and 23 ns). Random push/pop activity; every word must come out once,
// in order; pushes into a full FIFO must be refused and set the overflow
// flag, and never before the FIFO holds DEPTH words.
module tb_coreport;
  localparam int DEPTH = 4;
  logic wclk = 0, rclk = 0, rst_n = 0;
  logic push = 0, pop = 0, full, empty, overflow;
  logic [31:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  int wper = 5, rper = 3;
  logic [31:0] q [$];
  int sent = 0, rcvd = 0, refused = 0;

  coreport #(.W(32), .DEPTH(DEPTH)) dut (
    .wclk, .wrst_n(rst_n), .push, .wdata, .full, .overflow,
    .rclk, .rrst_n(rst_n), .pop, .rdata, .empty
  );

  always #(wper) wclk = ~wclk;
  always #(rper) rclk = ~rclk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  task automatic writer(int n, int pct);
    for (int i = 0; i < n; i++) begin
      @(negedge wclk);
      push = ($urandom_range(0, 99) < pct);
      wdata = $urandom;
      @(posedge wclk);
      if (push) begin
        if (!full) begin q.push_back(wdata); sent++; end
        else refused++;
      end
      #1 push = 0;
    end
  endtask

  // reader
  task automatic reader(int n, int pct);
    for (int i = 0; i < n; i++) begin
      @(negedge rclk);
      pop = ($urandom_range(0, 99) < pct) && !empty;
      if (pop) begin
        checks++;
        rcvd++;
        if (q.size() == 0 || rdata !== q[0]) begin
          failures++;
          $display("FAIL word %0d got %h", rcvd, rdata);
        end
        if (q.size() != 0) void'(q.pop_front());
      end
      @(posedge rclk);
      #1 pop = 0;
    end
  endtask

  initial begin
    #20 rst_n = 1;
    // phase 1: fill without reading, full must appear after exactly DEPTH words
    for (int i = 0; i < DEPTH + 2; i++) begin
      @(negedge wclk);
      checks++;
      if (full != (i >= DEPTH)) begin failures++; $display("FAIL full at %0d", i); end
      push = 1; wdata = 32'(i + 100);
      @(posedge wclk);
      if (!full) q.push_back(wdata); else refused++;
      #1 push = 0;
    end
    checks++;
    if (!overflow) begin failures++; $display("FAIL overflow flag"); end
    // phase 2: random traffic, both speeds
    fork
      writer(3000, 50);
      reader(5000, 60);
    join
    reader(200, 100);
    wper = 3; rper = 11;
    fork
      writer(2000, 70);
      reader(1500, 90);
    join
    reader(100, 100);
    checks++;
    if (q.size() != 0 || sent != rcvd - DEPTH || refused == 0) begin
      failures++;
      $display("FAIL left %0d sent %0d rcvd %0d refused %0d", q.size(), sent, rcvd, refused);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
