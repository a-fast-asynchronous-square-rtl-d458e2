// adder_controller: local four-phase controller with counter and ZeroPass.
//
// Stage 3 of the generator adds NUM_OPS DValues with NUM_OPS-1 additions on
// one adder. When the global request (Global_Rin) rises, this controller
// runs one local four-phase handshake per addition: it raises Local_Rin,
// which starts the adder, waits for Local_Ain, lowers Local_Rin and waits for
// Local_Ain to fall. Counter (0..NUM_OPS-1) selects the operands; after
// the last addition it equals NUM_OPS-1, the controller stops and raises the
// global complete signal, which stays high until Global_Rin falls.
//
// Zero_Detect: Local_Ain = Adder_Done OR (Local_Rin AND ZeroFlag of the
// current second operand). A zero operand therefore completes in one clock
// without waiting for the carry chain (the ZeroPass scheme); zero_sel tells
// the datapath to keep the running sum instead of taking the adder's sum,
// and the datapath does not start the adder for such an operand, so that no
// late Adder_Done can arrive after Local_Rin has fallen.
//
// Outputs are registered; step is a one-clock pulse at the end of each
// addition (the datapath stores the new running sum on it). The controller
// is written as a four-state machine (sqgen_pkg::lctrl_state_e).
module adder_controller
  import sqgen_pkg::*;
#(
  parameter int unsigned NUM_OPS = 8,
  localparam int unsigned CW     = $clog2(NUM_OPS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               global_rin,   // Global_Rin (Req2_in)
  output logic               global_done,  // global complete (Req2_out)
  input  logic [NUM_OPS-1:0] zero_flag,    // zero_flag[r]: DValue r is zero
  input  logic               adder_done,   // Adder_Done
  output logic               local_rin,    // Local_Rin: adder start and operand latch enable
  output logic               local_ain,    // Local_Ain from Zero_Detect
  output logic               zero_sel,     // ZeroFlag of the current second operand
  output logic               step,         // the current addition has completed
  output logic [CW-1:0]      counter       // Counter
);

  lctrl_state_e state;

  // Zero_Detect
  always_comb begin
    zero_sel  = 1'b0;
    for (int r = 1; r < int'(NUM_OPS); r++)
      if (int'(counter) + 1 == r) zero_sel = zero_flag[r];
    local_ain = adder_done | (local_rin & zero_sel);
    step      = (state == LC_REQ) && local_ain;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= LC_IDLE;
      local_rin   <= 1'b0;
      global_done <= 1'b0;
      counter     <= '0;
    end else begin
      unique case (state)
        LC_IDLE: if (global_rin) begin
          state     <= LC_REQ;
          local_rin <= 1'b1;
        end
        LC_REQ: if (local_ain) begin
          state     <= LC_RTZ;
          local_rin <= 1'b0;
          counter   <= counter + 1'b1;
        end
        LC_RTZ: if (!local_ain) begin
          if (int'(counter) == int'(NUM_OPS) - 1) begin
            state       <= LC_DONE;
            global_done <= 1'b1;
          end else begin
            state     <= LC_REQ;
            local_rin <= 1'b1;
          end
        end
        LC_DONE: if (!global_rin) begin
          state       <= LC_IDLE;
          global_done <= 1'b0;
          counter     <= '0;
        end
      endcase
    end
  end

  // Four-phase rule of the local channel: outside an addition (idle, or done
  // and waiting for the global request to fall) the acknowledge is low.
  a_local_ack: assert property (@(posedge clk) disable iff (!rst_n)
                                (state == LC_IDLE || state == LC_DONE) |-> !local_ain);

endmodule
