// decode_ctrl: frame and iteration control of the VNSA-based PGDBF decoder.
//
// The decoder is fully parallel and runs one decoding iteration per clock.
// A start pulse in IDLE asserts load for one cycle (the VNU registers take the
// received word, v = y) and moves to RUN. In every RUN cycle the check node
// array evaluates the current VN values:
//   - all checks satisfied: stop with success;
//   - otherwise, ITMAX iterations already done: stop without success;
//   - otherwise assert en (the VNUs store the flipped and shifted VN values),
//     count the iteration and advance rot by SHIFT_L modulo Z.
// rot is how far every VN has moved along its base column since the frame
// was loaded; the decoder uses it to put the output back in code order.
// done is a registered one-cycle pulse in the cycle after the decision, when
// the VN registers already hold the final word and stay unchanged; success,
// iters and rot keep their values until the next start. A frame that needs
// k flipping iterations therefore takes k + 2 cycles from the start cycle to
// the done cycle. start is ignored while busy. rst_n is an active-low synchronous reset.
module decode_ctrl #(
  parameter  int ITMAX   = 100,
  parameter  int Z       = 54,
  parameter  int SHIFT_L = 1,
  localparam int IW      = $clog2(ITMAX + 1),
  localparam int RW      = $clog2(Z)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          all_sat,
  output logic          load,
  output logic          en,
  output logic          busy,
  output logic          done,
  output logic          success,
  output logic [IW-1:0] iters,
  output logic [RW-1:0] rot
);
  typedef enum logic {IDLE, RUN} state_t;
  state_t state;

  localparam logic [RW-1:0] STEP = RW'(SHIFT_L % Z);

  assign load = (state == IDLE) && start;
  assign en   = (state == RUN) && !all_sat && (iters != IW'(ITMAX));
  assign busy = (state == RUN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= IDLE;
      done    <= 1'b0;
      success <= 1'b0;
      iters   <= '0;
      rot     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          state   <= RUN;
          success <= 1'b0;
          iters   <= '0;
          rot     <= '0;
        end
        RUN: begin
          if (all_sat || iters == IW'(ITMAX)) begin
            state   <= IDLE;
            done    <= 1'b1;
            success <= all_sat;
          end else begin
            iters <= iters + 1'b1;
            // rot + STEP < 2Z, so one conditional subtraction is a modulo
            if ({1'b0, rot} + {1'b0, STEP} >= (RW+1)'(Z))
              rot <= RW'({1'b0, rot} + {1'b0, STEP} - (RW+1)'(Z));
            else
              rot <= rot + STEP;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // a frame never runs more than ITMAX flipping iterations
  a_itmax: assert property (@(posedge clk) disable iff (!rst_n) iters <= IW'(ITMAX));
  a_rot:   assert property (@(posedge clk) disable iff (!rst_n) int'(rot) < Z);
endmodule
