// tb_host_logger: frame contents, decimation and frame dropping.
//
// 400 steps of random model results are logged with DECIM = 10 into a
// 64-word FIFO. During the first half the host reads continuously and every
// frame must arrive complete: header with sync byte, state indices and step
// number, then the sixteen quantities in their documented order. During the
// second half the host stops reading, so the FIFO fills and whole frames must
// be dropped and counted, never cut.
module tb_host_logger;
  import fp_pkg::*;
  import rect_pkg::*;

  localparam int DECIM = 10, D = 64, FW = 17;
  logic clk = 1'b0;
  logic rst, step_done, valid, ready;
  model_out_t mo;
  logic [31:0] step_no, frames, dropped;
  fp64_t data;
  int checks = 0, failures = 0;
  fp64_t exp_q [$];
  int got_words = 0;

  host_logger #(.DECIM(DECIM), .DEPTH(D)) dut (
    .clk(clk), .rst(rst), .step_done(step_done), .mo(mo), .step_no(step_no),
    .sys_state(3'd4), .failure(1'b0), .overrun(1'b0), .shoot_through(3'b000),
    .t2h_data(data), .t2h_valid(valid), .t2h_ready(ready), .frames(frames), .dropped(dropped)
  );

  always #5 clk = ~clk;

  // host reader
  always @(negedge clk) begin
    if (!rst && valid && ready) begin
      checks++;
      got_words++;
      if (exp_q.size() == 0) failures++;
      else if (data !== exp_q.pop_front()) begin
        failures++;
        if (failures < 10) $display("word %0d wrong: %h", got_words, data);
      end
    end
  end

  initial begin
    int n_drop_exp = 0, stored = 0;
    rst = 1'b1; step_done = 0; mo = '0; step_no = 0; ready = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 400; n++) begin
      for (int i = 0; i < NBR; i++) begin
        mo.ias[i] = {$urandom, $urandom}; mo.uav[i] = {$urandom, $urandom};
        mo.ur[i] = {$urandom, $urandom}; mo.ul[i] = {$urandom, $urandom};
        mo.state[i] = 3'($urandom_range(1, 7));
      end
      mo.ud = {$urandom, $urandom}; mo.id = {$urandom, $urandom};
      mo.iap = {$urandom, $urandom}; mo.uap = {$urandom, $urandom};
      step_no = 32'(n);
      if (n == 200) ready = 1'b0;
      if (n % DECIM == DECIM - 1) begin
        if (ready || (D - stored) >= FW) begin
          exp_q.push_back({8'hA5, 4'b0, 3'd4, 1'b0, 1'b0, 1'b0, 3'b000,
                           mo.state[2], mo.state[1], mo.state[0], 2'b0, 32'(n)});
          for (int i = 0; i < NBR; i++) exp_q.push_back(mo.ias[i]);
          exp_q.push_back(mo.ud);
          for (int i = 0; i < NBR; i++) exp_q.push_back(mo.uav[i]);
          for (int i = 0; i < NBR; i++) exp_q.push_back(mo.ur[i]);
          for (int i = 0; i < NBR; i++) exp_q.push_back(mo.ul[i]);
          exp_q.push_back(mo.id);
          exp_q.push_back(mo.iap);
          exp_q.push_back(mo.uap);
          if (!ready) stored += FW;
        end else begin
          n_drop_exp++;
        end
      end
      step_done = 1'b1;
      @(negedge clk);
      step_done = 1'b0;
      repeat (30) @(negedge clk);
    end
    checks += 3;
    if (dropped != 32'(n_drop_exp) || n_drop_exp == 0) begin
      failures++;
      $display("dropped %0d expected %0d", dropped, n_drop_exp);
    end
    if (frames != 32'(40 - n_drop_exp)) failures++;
    // drain the rest and check it
    ready = 1'b1;
    repeat (100) @(negedge clk);
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
