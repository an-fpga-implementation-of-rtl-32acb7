// ldpc_ctrl: central control block of the decoder.
//
// Sequences the decoding of one frame and manages the frame buffers:
//   INIT  L+3 cycles : vn_rd for L cycles with init high (intrinsic -> extrinsic pass),
//                      then 3 cycles for the last writes of the 3-stage loop;
//   CNP   L+5 cycles : cn_rd for L cycles (check node processing), then 5 cycles for the
//                      last writes of the 5-stage loop. The parity results of the CNUs
//                      are ORed over the phase (they arrive 4 clocks after each read);
//                      if every parity check was satisfied the frame terminates here;
//   VNP   L+3 cycles : vn_rd for L cycles (variable node processing), then 3 cycles.
//                      After MAX_ITER iterations (CNP+VNP pairs) the frame ends.
//   DONE  1 cycle    : the DEC_RAM bank that was written becomes the readout bank,
//                      frame_done pulses with the iteration count and the stop cause.
// ag_load is asserted in the last cycle before every CNP so that the address
// generators start from their load values. step = vn_addr = the read index in the
// current phase.
// Frame buffering: the host loads the next frame into the free INT_RAM bank while a
// frame is decoded; frame_loaded (pulse) marks it complete. A new decode starts when
// the controller is idle and a loaded frame is waiting; at that point the INT_RAM
// banks swap and ld_ready rises again.
// The source architecture states 2L cycles per iteration plus L for initialisation;
// the drain cycles after each phase (8 per iteration, 3 for initialisation) are this
// design's way of keeping a phase from reading a location whose write-back is still
// in the pipeline, since the three address generators of a PE block start at
// different offsets. Early termination, MAX_ITER = 18 and the double-buffered frame
// scheme follow the source architecture.
// An assertion checks that the host never completes a second frame while one is still
// waiting. Its "disable iff (!rst_n)" uses the asynchronous reset as a synchronous
// term, which lint reports as a mixed sync/async reset; that is expected and creates
// no hardware.
module ldpc_ctrl
  import ldpc_pkg::*;
#(
  parameter int L        = 256,
  parameter int MAX_ITER = 18,
  localparam int AW      = $clog2(L),
  localparam int IW      = $clog2(MAX_ITER + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          frame_loaded,
  output logic          ld_ready,
  input  logic          parity_fail,    // OR of all CNU parity outputs this cycle
  output phase_t        phase,
  output logic          ag_load,
  output logic          cn_rd,
  output logic          vn_rd,
  output logic          init,
  output logic [AW-1:0] vn_addr,
  output logic [AW-1:0] step,
  output logic          int_bank,
  output logic          dec_bank,
  output logic          frame_done,
  output logic [IW-1:0] done_iters,
  output logic          done_converged
);
  localparam int VN_LAT = 3;
  localparam int CN_LAT = 5;
  localparam int PV_LAT = 4;   // read -> CNU parity output

  localparam int CW = $clog2(L + CN_LAT + 1);

  phase_t        state;
  logic [CW-1:0] cnt;
  logic [IW-1:0] iter;
  logic          next_loaded;
  logic          fail_acc;
  logic [PV_LAT-1:0] pv_d;

  logic init_end, cnp_end, vnp_end, last_iter;
  assign init_end  = (state == PH_INIT) && (int'(cnt) == L + VN_LAT - 1);
  assign cnp_end   = (state == PH_CNP)  && (int'(cnt) == L + CN_LAT - 1);
  assign vnp_end   = (state == PH_VNP)  && (int'(cnt) == L + VN_LAT - 1);
  assign last_iter = (int'(iter) == MAX_ITER - 1);

  assign phase    = state;
  assign cn_rd    = (state == PH_CNP) && (int'(cnt) < L);
  assign vn_rd    = (state == PH_INIT || state == PH_VNP) && (int'(cnt) < L);
  assign init     = (state == PH_INIT);
  assign vn_addr  = cnt[AW-1:0];
  assign step     = cnt[AW-1:0];
  assign ag_load  = init_end || (vnp_end && !last_iter);
  assign ld_ready = !next_loaded;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= PH_IDLE;
      cnt            <= '0;
      iter           <= '0;
      next_loaded    <= 1'b0;
      fail_acc       <= 1'b0;
      pv_d           <= '0;
      int_bank       <= 1'b0;
      dec_bank       <= 1'b0;
      frame_done     <= 1'b0;
      done_iters     <= '0;
      done_converged <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      pv_d       <= {pv_d[PV_LAT-2:0], cn_rd};
      if (pv_d[PV_LAT-1] && parity_fail) fail_acc <= 1'b1;
      if (frame_loaded) next_loaded <= 1'b1;

      unique case (state)
        PH_IDLE: begin
          if (next_loaded) begin
            state       <= PH_INIT;
            cnt         <= '0;
            iter        <= '0;
            int_bank    <= ~int_bank;
            next_loaded <= frame_loaded;
          end
        end
        PH_INIT: begin
          cnt <= cnt + 1'b1;
          if (init_end) begin
            state    <= PH_CNP;
            cnt      <= '0;
            fail_acc <= 1'b0;
          end
        end
        PH_CNP: begin
          cnt <= cnt + 1'b1;
          if (cnp_end) begin
            cnt <= '0;
            if (!fail_acc) begin
              state          <= PH_DONE;
              done_converged <= 1'b1;
            end else begin
              state <= PH_VNP;
            end
          end
        end
        PH_VNP: begin
          cnt <= cnt + 1'b1;
          if (vnp_end) begin
            cnt  <= '0;
            iter <= iter + 1'b1;
            if (last_iter) begin
              state          <= PH_DONE;
              done_converged <= 1'b0;
            end else begin
              state    <= PH_CNP;
              fail_acc <= 1'b0;
            end
          end
        end
        PH_DONE: begin
          state      <= PH_IDLE;
          dec_bank   <= ~dec_bank;
          frame_done <= 1'b1;
          done_iters <= iter;
        end
        default: state <= PH_IDLE;
      endcase
    end
  end

  // A frame must not be announced while the previous one is still waiting.
  assert property (@(posedge clk) disable iff (!rst_n) frame_loaded |-> !next_loaded || state == PH_IDLE)
    else $error("frame_loaded while ld_ready is low");
endmodule
