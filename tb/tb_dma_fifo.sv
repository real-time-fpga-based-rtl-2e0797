// Self-checking test of dma_fifo (DEPTH overridden to 37, not a power of
// two): random pushes and pops against a queue model, data order, the read
// registered read, the full flag, and the overflow alarm and its clear.
module tb_dma_fifo;
  localparam int DEPTH = 37;
  logic clk = 0, rst = 1, wr_en = 0, rd_en = 0, alarm_clr = 0;
  logic [15:0] wr_data, rd_data;
  logic rd_valid, empty, full, overflow;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, nfull = 0, novf = 0;
  logic [15:0] q[$];
  logic exp_valid = 0;
  logic [15:0] exp_data;

  dma_fifo #(.DEPTH(DEPTH), .W(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 6000; n++) begin
      // bias towards filling in the middle phase
      logic w, r;
      w = (n < 3000) ? ($urandom % 4 != 0) : ($urandom % 2 != 0);
      r = (n < 3000) ? ($urandom % 3 == 0) : ($urandom % 3 != 0);
      wr_en <= w; rd_en <= r; wr_data <= 16'($urandom);
      alarm_clr <= (n == 4000);
      @(posedge clk);
      #1;
      // model the clock edge that just happened
      exp_valid = 0;
      begin
        int c;
        c = q.size();
        if (rd_en && c > 0) begin exp_data = q.pop_front(); exp_valid = 1; end
        if (wr_en && c < DEPTH) q.push_back(wr_data);
        if (wr_en && c == DEPTH) novf++;
        if (c == DEPTH) nfull++;
      end
      // check the read accepted at this clock edge
      if (exp_valid) begin
        checks++;
        if (!rd_valid || rd_data != exp_data) begin
          failures++; if (failures < 10) $display("FAIL: read %h expected %h", rd_data, exp_data);
        end
      end else begin
        checks++;
        if (rd_valid) failures++;
      end
      checks++;
      if (count != q.size()) begin failures++; if (failures < 10) $display("FAIL: count %0d vs %0d", count, q.size()); end
      checks++;
      if (full != (q.size() == DEPTH)) failures++;
      if (n == 3999) begin
        checks++;
        if (!overflow) begin failures++; $display("FAIL: no overflow alarm"); end
      end
    end
    checks++;
    if (nfull == 0 || novf == 0) begin failures++; $display("FAIL: FIFO never filled"); end
    $display("full %0d times, %0d dropped pushes", nfull, novf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
