// tb_host_input: unpacking of the host's (u_ap, i_l) frames.
//
// Sends 200 frames with random gaps between words through an 8-word FIFO.
// After every completed frame
// uap and il must equal that frame's two words and frames must count it; a
// half-received frame must leave the previous values untouched.
module tb_host_input;
  import fp_pkg::*;
  localparam int D = 8;
  logic clk = 1'b0;
  logic rst, valid, ready;
  fp64_t data, uap, il;
  logic [31:0] frames;
  int checks = 0, failures = 0, n_stall = 0;

  host_input #(.DEPTH(D)) dut (
    .clk(clk), .rst(rst), .h2t_data(data), .h2t_valid(valid), .h2t_ready(ready),
    .uap(uap), .il(il), .frames(frames)
  );

  always #5 clk = ~clk;

  task automatic send(fp64_t w);
    valid = 1'b1;
    data  = w;
    @(posedge clk);
    while (!ready) begin n_stall++; @(posedge clk); end
    @(negedge clk);
    valid = 1'b0;
  endtask

  initial begin
    fp64_t a, b, pa, pb;
    rst = 1'b1; valid = 0; data = 0; pa = 0; pb = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int f = 0; f < 200; f++) begin
      a = $realtobits($urandom_range(0, 100000) / 100.0 - 500.0);
      b = $realtobits($urandom_range(0, 2000) / 100.0);
      send(a);
      repeat ($urandom_range(0, 3)) @(negedge clk);
      // only half a frame received: outputs still hold the previous frame
      checks += 2;
      if (uap !== pa) failures++;
      if (il !== pb) failures++;
      send(b);
      repeat (3) @(negedge clk);
      checks += 3;
      if (uap !== a) failures++;
      if (il !== b) failures++;
      if (frames != 32'(f + 1)) failures++;
      pa = a; pb = b;
    end
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
