// seq_div: unsigned restoring divider, one quotient bit per clock.
//
// A pulse on start latches num and den; W clocks later done pulses for one
// clock with quo = num / den. A zero divisor gives an all-ones quotient.
// Used by the tuning, current-sharing and transient blocks, whose divisions
// (eqs. (5), (6), (11), (21), (23), (24)) are rare enough that one bit per
// clock costs nothing. The divider is this design's own choice; the document
// gives only the equations.
module seq_div #(
  parameter int unsigned W = 48
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quo
);
  logic [W-1:0] rem, q, d;
  logic [$clog2(W+1)-1:0] cnt;
  logic [W:0] trial;

  always_comb trial = {rem[W-1:0], q[W-1]} - {1'b0, d};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem <= '0; q <= '0; d <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0; quo <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rem <= '0; q <= num; d <= den; cnt <= '0; busy <= 1'b1;
      end else if (busy) begin
        if (!trial[W]) begin
          rem <= trial[W-1:0];
          q   <= {q[W-2:0], 1'b1};
        end else begin
          rem <= {rem[W-2:0], q[W-1]};
          q   <= {q[W-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
        if (cnt == ($clog2(W+1))'(W-1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          quo  <= (!trial[W]) ? {q[W-2:0], 1'b1} : {q[W-2:0], 1'b0};
        end
      end
    end
  end
endmodule
