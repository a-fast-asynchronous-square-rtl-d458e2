// pipeline_stage_ctrl: one stage of a four-phase bundled-data pipeline.
//
// The incoming request passes through a matched delay of DELAY clocks (the
// delay of the stage's logic, so that the data has settled when the request
// arrives), then into a C-element whose other input is the inverted
// acknowledge from the next stage. The C-element output is at once the
// request to the next stage, the acknowledge to the previous stage and the
// enable of the stage's data latch. The latch captures data_in when the
// C-element output rises and holds it until the next rise, which cannot come
// before the next stage has taken the value. DELAY = 0 gives a stage whose
// request already comes from completion detection.
//
// Timing model: clk is the time base of the self-timed emulation (one clock
// per gate delay). The C-element output changes one clock after its inputs
// agree.
module pipeline_stage_ctrl #(
  parameter int unsigned DW    = 32,  // data width
  parameter int unsigned DELAY = 4    // matched delay, in clocks
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_in,    // from the previous stage
  output logic          ack_out,   // to the previous stage
  input  logic [DW-1:0] data_in,   // output of this stage's logic
  output logic          req_out,   // to the next stage
  input  logic          ack_in,    // from the next stage
  output logic [DW-1:0] data_out   // latched data
);

  logic req_d;

  if (DELAY == 0) begin : g_nodelay
    assign req_d = req_in;
  end else begin : g_delay
    logic [DELAY-1:0] dly;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) dly <= '0;
      else        dly <= DELAY'({dly, req_in});
    end
    assign req_d = dly[DELAY-1];
  end

  logic c_q;

  c_element u_c (
    .clk   (clk),
    .rst_n (rst_n),
    .a     (req_d),
    .b     (~ack_in),
    .z     (c_q)
  );

  // latch enable: the clock edge on which the C-element output rises
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         data_out <= '0;
    else if (req_d && !ack_in && !c_q)  data_out <= data_in;
  end

  assign req_out = c_q;
  assign ack_out = c_q;

  // Four-phase rules: the next stage acknowledges only a raised request, and
  // the previous stage withdraws its request only after the acknowledge.
  a_ack_after_req: assert property (@(posedge clk) disable iff (!rst_n)
                                    $rose(ack_in) |-> req_out);
  a_req_held:      assert property (@(posedge clk) disable iff (!rst_n)
                                    $fell(req_in) |-> $past(ack_out));

endmodule
