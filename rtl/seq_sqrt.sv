// seq_sqrt: unsigned integer square root, one result bit per clock.
//
// A pulse on start latches x (W bits, W even); W/2 clocks later done pulses
// with root = floor(sqrt(x)). Digit-by-digit (non-restoring remainder)
// method. Used for the square roots of the thermal-equalizing current split
// (eq. (21)) and of the charge-balance recovery pulse; the method is this
// design's own choice.
module seq_sqrt #(
  parameter int unsigned W = 40
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   x,
  output logic           busy,
  output logic           done,
  output logic [W/2-1:0] root
);
  logic [W-1:0]   xs;
  logic [W/2+1:0] rem;
  logic [W/2-1:0] r;
  logic [$clog2(W/2+1)-1:0] cnt;
  logic [W/2+1:0] nrem, trial;

  always_comb begin
    nrem  = {rem[W/2-1:0], xs[W-1:W-2]};
    trial = nrem - {r, 2'b01};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs <= '0; rem <= '0; r <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0; root <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        xs <= x; rem <= '0; r <= '0; cnt <= '0; busy <= 1'b1;
      end else if (busy) begin
        xs <= xs << 2;
        if (!trial[W/2+1]) begin
          rem <= trial;
          r   <= {r[W/2-2:0], 1'b1};
        end else begin
          rem <= nrem;
          r   <= {r[W/2-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
        if (cnt == ($clog2(W/2+1))'(W/2-1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          root <= (!trial[W/2+1]) ? {r[W/2-2:0], 1'b1} : {r[W/2-2:0], 1'b0};
        end
      end
    end
  end
endmodule
