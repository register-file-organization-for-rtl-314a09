// loop_ctrl: kernel sequencer of the CGRA.
//
// A modulo-scheduled loop runs as a kernel of II instructions per PE that is
// repeated once per iteration. On start the controller latches II and the
// number of kernel iterations, then steps ctx_addr through 0..II-1 with run
// high. iter_end is high in the last cycle of every iteration, which is when
// the register files advance their rotation offset. After the last
// iteration done pulses for one cycle and the controller returns to idle.
// A start with zero iterations or II = 0 pulses done without running. Start
// is ignored while running. Prologue and epilogue are expected to be handled
// by predication inside the kernel; that, the interface and the two-state
// FSM are this design's own.
module loop_ctrl #(
  parameter int unsigned CTX_DEPTH = 16,
  parameter int unsigned ITER_W    = 16,
  localparam int unsigned AW       = (CTX_DEPTH > 1) ? $clog2(CTX_DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [AW:0]       ii,
  input  logic [ITER_W-1:0] iters,
  output logic [AW-1:0]     ctx_addr,
  output logic              run,
  output logic              iter_end,
  output logic [ITER_W-1:0] iter_cnt,
  output logic              done
);

  typedef enum logic {S_IDLE, S_RUN} state_e;
  state_e state;
  logic [AW:0]       ii_q;
  logic [ITER_W-1:0] iters_q;
  logic              last_iter;

  assign run       = (state == S_RUN);
  assign iter_end  = run && ({1'b0, ctx_addr} == ii_q - 1'b1);
  assign last_iter = (iter_cnt == iters_q - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      ctx_addr <= '0;
      ii_q     <= '0;
      iters_q  <= '0;
      iter_cnt <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          ctx_addr <= '0;
          iter_cnt <= '0;
          ii_q     <= ii;
          iters_q  <= iters;
          if (iters == '0 || ii == '0 || ii > (AW+1)'(CTX_DEPTH)) done <= 1'b1;
          else                                                     state <= S_RUN;
        end
        S_RUN: begin
          if (iter_end) begin
            ctx_addr <= '0;
            iter_cnt <= iter_cnt + 1'b1;
            if (last_iter) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end else begin
            ctx_addr <= ctx_addr + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
