// seq_div: unsigned sequential (restoring) divider, one quotient bit per
// cycle. start loads dividend and divisor; done pulses W+1 cycles later with
// quotient and remainder valid (they stay valid until the next start).
// A zero divisor gives an all-ones quotient and the dividend as remainder.
// Helper of the time transmission module.
module seq_div #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);

  logic [W-1:0]         dvs;
  logic [$clog2(W+1)-1:0] cnt;
  logic [W:0]           part;
  logic [W+1:0]         trial;

  assign part  = {remainder, quotient[W-1]};
  assign trial = {1'b0, part} - {2'b0, dvs};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dvs <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0;
      quotient <= '0; remainder <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        dvs       <= divisor;
        quotient  <= dividend;
        remainder <= '0;
        cnt       <= ($clog2(W+1))'(W);
        busy      <= 1'b1;
      end else if (busy) begin
        // shift {remainder, quotient} left, try to subtract the divisor
        if (!trial[W+1]) begin
          remainder <= trial[W-1:0];
          quotient  <= {quotient[W-2:0], 1'b1};
        end else begin
          remainder <= part[W-1:0];
          quotient  <= {quotient[W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
