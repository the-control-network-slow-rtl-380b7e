// bc_meb_mirror: mirror of the ALTRO multi-event buffers (MEB) of one FEC.
//
// Each ALTRO stores accepted events in a multi-event buffer addressed by a
// write and a read pointer. The BC keeps its own copy of that state for all
// N_CHIPS chips, updated from what it sees on the bus:
//   write   (an L2 trigger for all chips, or a WPINC command) advances the
//           write pointer and takes one buffer;
//   release (an RPINC command) advances the read pointer and frees one;
//   readout (CHRDO of one channel) only checks that the buffer is not empty.
// WPINC and RPINC apply to one chip or, when broadcast, to all chips.
// Per chip it keeps WRPTER and RDPTER (3 bits) and MEVBF, the number of
// occupied buffers (4 bits); per channel RBUFF, the buffers still free
// (4 bits, N_CHIPS x N_CH of them). Global reset (grst_i) and BCRST empty
// all buffers.
//
// Errors (one-cycle pulses):
//   BFULL   an L2 trigger or WPINC arrives while a chip's buffer is full
//           (that chip's state is then left unchanged);
//   BEMPY   a channel readout is requested from a chip with an empty buffer;
//   BSYERR  at an L2 trigger the chips do not all hold the same number of
//           events, so their buffers are out of step.
// Register sizes follow the buffer monitoring table. MEB_DEPTH, the
// release-only-by-RPINC rule and the moment BSYERR is checked are this
// design's choices; an RPINC on an empty buffer is ignored.
module bc_meb_mirror
  import bc_pkg::*;
#(
  parameter int unsigned MEB_DEPTH = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic soft_rst_i,
  input  logic grst_i,
  input  logic l2_i,
  input  logic wpinc_i,
  input  logic rpinc_i,
  input  logic chrdo_i,
  input  logic [2:0] chip_i,
  input  logic bcast_i,
  output logic [N_CHIPS-1:0][2:0]           wrpter_o,
  output logic [N_CHIPS-1:0][2:0]           rdpter_o,
  output logic [N_CHIPS-1:0][3:0]           mevbf_o,
  output logic [N_CHIPS-1:0][N_CH-1:0][3:0] rbuff_o,
  output logic bfull_o,
  output logic bempy_o,
  output logic bsyerr_o
);

  localparam logic [3:0] DEPTH = 4'(MEB_DEPTH);

  function automatic logic [2:0] ptr_inc(logic [2:0] p);
    return (p == 3'(MEB_DEPTH - 1)) ? 3'd0 : p + 3'd1;
  endfunction

  logic [N_CHIPS-1:0] sel, wr_sel, rd_sel;
  logic               any_full, mismatch;

  always_comb begin
    for (int c = 0; c < N_CHIPS; c++)
      sel[c] = bcast_i || (chip_i == 3'(c));
    wr_sel = l2_i ? '1 : (wpinc_i ? sel : '0);
    rd_sel = rpinc_i ? sel : '0;
    any_full = 1'b0;
    mismatch = 1'b0;
    for (int c = 0; c < N_CHIPS; c++) begin
      if (wr_sel[c] && mevbf_o[c] == DEPTH) any_full = 1'b1;
      if (mevbf_o[c] != mevbf_o[0]) mismatch = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wrpter_o <= '0; rdpter_o <= '0; mevbf_o <= '0;
      rbuff_o  <= {N_CHIPS*N_CH{DEPTH}};
      bfull_o  <= 1'b0; bempy_o <= 1'b0; bsyerr_o <= 1'b0;
    end else if (soft_rst_i || grst_i) begin
      wrpter_o <= '0; rdpter_o <= '0; mevbf_o <= '0;
      rbuff_o  <= {N_CHIPS*N_CH{DEPTH}};
      bfull_o  <= 1'b0; bempy_o <= 1'b0; bsyerr_o <= 1'b0;
    end else begin
      bfull_o  <= any_full;
      bempy_o  <= chrdo_i && (mevbf_o[chip_i] == 4'd0);
      bsyerr_o <= l2_i && mismatch;
      for (int c = 0; c < N_CHIPS; c++) begin
        if (wr_sel[c] && mevbf_o[c] != DEPTH) begin
          wrpter_o[c] <= ptr_inc(wrpter_o[c]);
          mevbf_o[c]  <= mevbf_o[c] + 4'd1;
          for (int h = 0; h < N_CH; h++) rbuff_o[c][h] <= rbuff_o[c][h] - 4'd1;
        end else if (rd_sel[c] && mevbf_o[c] != 4'd0) begin
          rdpter_o[c] <= ptr_inc(rdpter_o[c]);
          mevbf_o[c]  <= mevbf_o[c] - 4'd1;
          for (int h = 0; h < N_CH; h++) rbuff_o[c][h] <= rbuff_o[c][h] + 4'd1;
        end
      end
    end
  end

  // the mirror never holds more events than the buffer has room for, and the
  // free count of every channel agrees with its chip's occupancy
  for (genvar c = 0; c < N_CHIPS; c++) begin : g_chk
    a_depth: assert property (@(posedge clk) disable iff (!rst_n)
      mevbf_o[c] <= DEPTH && rbuff_o[c][0] == DEPTH - mevbf_o[c]);
  end

endmodule
