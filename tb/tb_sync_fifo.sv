// tb_sync_fifo: random push/pop against a queue model.
//
// A 16-deep, 12-bit FIFO is written and read at random rates for long
// enough to run it full and empty many times; data order, full, empty and
// count are checked every clock.
module tb_sync_fifo;
  localparam int W = 12, D = 16;
  logic clk = 1'b0;
  logic rst, we, re, full, empty;
  logic [W-1:0] wd, rd;
  logic [$clog2(D):0] count;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .clk(clk), .rst(rst), .wr_en(we), .wr_data(wd), .full(full),
    .rd_en(re), .rd_data(rd), .empty(empty), .count(count)
  );

  always #5 clk = ~clk;

  initial begin
    rst = 1'b1; we = 0; re = 0; wd = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 20000; n++) begin
      automatic int bias = (n / 500) % 2;      // alternate filling and draining phases
      checks += 3;
      if (full !== (q.size() == D)) failures++;
      if (empty !== (q.size() == 0)) failures++;
      if (int'(count) != q.size()) failures++;
      if (full) n_full++;
      if (empty) n_empty++;
      we = ($urandom_range(0, 9) < (bias ? 7 : 3)) && !full;
      re = ($urandom_range(0, 9) < (bias ? 3 : 7)) && !empty;
      wd = W'($urandom);
      if (re) begin
        checks++;
        if (rd !== q[0]) failures++;
      end
      @(posedge clk);
      if (re) void'(q.pop_front());
      if (we) q.push_back(wd);
      @(negedge clk);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
