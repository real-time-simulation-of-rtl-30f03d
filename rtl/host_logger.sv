// host_logger: target-to-host stream of simulation results.
//
// Every DECIM-th completed step (16 kHz with the 6.25 us step) the logger
// takes a snapshot of all model quantities and writes one frame of
// FRAME_WORDS 64-bit words into the target-to-host FIFO, one word per clock:
//   word 0   : 8'hA5 sync | 4'b0 | sys_state(3) | 1'b0 | failure | overrun |
//              shoot_through(3) | states (3 x 3 bits) | 2'b0 | step number(32)
//   words 1-16: i_as1..3, u_d, u_av1..3, u_R1..3, u_L1..3, i_d, i_ap, u_ap
// A frame is only started if the FIFO has room for all of it; otherwise it
// is dropped whole and dropped counts it. The host reads with
// t2h_valid/t2h_ready (first word fall through). DECIM = 10 follows the
// model; the frame layout and the 1024-word depth are this design's choices.
module host_logger
  import fp_pkg::*;
  import rect_pkg::*;
#(
  parameter int unsigned DECIM = 10,
  parameter int unsigned DEPTH = 1024
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             step_done,
  input  model_out_t       mo,
  input  logic [31:0]      step_no,
  input  logic [2:0]       sys_state,
  input  logic             failure,
  input  logic             overrun,
  input  logic [NBR-1:0]   shoot_through,
  output fp64_t            t2h_data,
  output logic             t2h_valid,
  input  logic             t2h_ready,
  output logic [31:0]      frames,
  output logic [31:0]      dropped
);

  localparam int FRAME_WORDS = 17;

  localparam int CW = $clog2(DECIM + 1);
  logic [CW-1:0] cnt;
  fp64_t frame_q [FRAME_WORDS];
  logic  [4:0] widx;
  logic        sending;
  logic        full, empty;
  logic [$clog2(DEPTH):0] count;

  sync_fifo #(.WIDTH(64), .DEPTH(DEPTH)) u_fifo (
    .clk(clk), .rst(rst),
    .wr_en(sending), .wr_data(frame_q[widx]), .full(full),
    .rd_en(t2h_ready && !empty), .rd_data(t2h_data), .empty(empty), .count(count)
  );

  assign t2h_valid = !empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      widx    <= '0;
      sending <= 1'b0;
      frames  <= '0;
      dropped <= '0;
      for (int w = 0; w < FRAME_WORDS; w++) frame_q[w] <= '0;
    end else begin
      if (sending) begin
        if (widx == 5'(FRAME_WORDS - 1)) begin
          sending <= 1'b0;
          frames  <= frames + 1'b1;
        end
        widx <= widx + 1'b1;
      end
      if (step_done) begin
        if (cnt == CW'(DECIM - 1)) begin
          cnt <= '0;
          if (!sending && (DEPTH - 32'(count)) >= FRAME_WORDS) begin
            sending    <= 1'b1;
            widx       <= '0;
            frame_q[0] <= {8'hA5, 4'b0, sys_state, 1'b0, failure, overrun, shoot_through,
                           mo.state[2], mo.state[1], mo.state[0], 2'b0, step_no};
            for (int i = 0; i < NBR; i++) begin
              frame_q[1 + i]  <= mo.ias[i];
              frame_q[5 + i]  <= mo.uav[i];
              frame_q[8 + i]  <= mo.ur[i];
              frame_q[11 + i] <= mo.ul[i];
            end
            frame_q[4]  <= mo.ud;
            frame_q[14] <= mo.id;
            frame_q[15] <= mo.iap;
            frame_q[16] <= mo.uap;
          end else begin
            dropped <= dropped + 1'b1;
          end
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  // room for the whole frame was checked before it started
  a_no_overflow: assert property (@(posedge clk) disable iff (rst) sending |-> !full);

endmodule
