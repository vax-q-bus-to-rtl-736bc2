// qi715_sync: multi-stage synchronizer for the asynchronous Q-Bus control
// strobes (SYNC, DIN, DOUT, RPLY, INIT) entering the clocked 0715 logic.
// Each bit passes through STAGES flip-flops; latency is STAGES clock cycles.
// The data and address lines are not synchronized: the Q-Bus guarantees they
// are stable before the strobe that qualifies them, and the logic only
// samples them after that strobe has been synchronized. The document does
// not say how the original module was clocked; the clocked form is this
// design's own.
module qi715_sync #(
  parameter int unsigned WIDTH  = 1,
  parameter int unsigned STAGES = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] pipe [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < STAGES; i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= d;
      for (int i = 1; i < STAGES; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign q = pipe[STAGES-1];
endmodule
