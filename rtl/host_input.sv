// host_input: target side of the host-to-target stream of model inputs.
//
// The host sends the model's external quantities as a stream of binary64
// words, in frames of two: primary voltage u_ap, then load current i_l. The
// words land in a FIFO (host writes with h2t_valid/h2t_ready, ready meaning
// not full) and are unpacked as soon as they are available; a complete frame
// updates uap and il together, so the solver, which samples them at the
// start of each step, never sees half a frame. Values are held until the
// next frame. frames counts completed frames.
// Sending u_ap (and deriving the secondary voltages on the FPGA through the
// transformation ratios) and the two-word frame format are this design's
// choices; FIFO depth 1024 words is assumed.
module host_input
  import fp_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  fp64_t       h2t_data,
  input  logic        h2t_valid,
  output logic        h2t_ready,
  output fp64_t       uap,
  output fp64_t       il,
  output logic [31:0] frames
);

  logic  full, empty, pop;
  fp64_t head, uap_stage;
  logic  word_sel;                 // 0: expecting u_ap, 1: expecting i_l

  sync_fifo #(.WIDTH(64), .DEPTH(DEPTH)) u_fifo (
    .clk(clk), .rst(rst),
    .wr_en(h2t_valid), .wr_data(h2t_data), .full(full),
    .rd_en(pop), .rd_data(head), .empty(empty), .count()
  );

  assign h2t_ready = !full;
  assign pop       = !empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      word_sel  <= 1'b0;
      uap_stage <= FP_ZERO;
      uap       <= FP_ZERO;
      il        <= FP_ZERO;
      frames    <= '0;
    end else if (pop) begin
      if (!word_sel) begin
        uap_stage <= head;
        word_sel  <= 1'b1;
      end else begin
        uap      <= uap_stage;
        il       <= head;
        word_sel <= 1'b0;
        frames   <= frames + 1'b1;
      end
    end
  end

endmodule
