// mod_shift_reduce: n-residue of a message, M * 2^k mod n.
//
// Restoring shift-and-subtract reduction: the remainder starts at zero and,
// for each bit of M from the most significant down and then for k more zero
// bits, is doubled, takes in the next bit and loses n if it reaches n. After
// W + k steps it equals (M * 2^k) mod n. The document writes this step as
// a multiplication followed by a remainder; doing it serially with one
// subtractor is this design's choice. M may be larger than n.
//
// Interface: pulse start with m, n (n > 0) and k stable until done. done
// pulses for one cycle and res then holds. Timing: done comes W + k + 2
// cycles after start.
module mod_shift_reduce #(
  parameter int unsigned W = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [W-1:0]           m,
  input  logic [W-1:0]           n,
  input  logic [$clog2(W+1)-1:0] k,
  output logic [W-1:0]           res,
  output logic                   busy,
  output logic                   done
);

  localparam int unsigned CW = $clog2(2*W+1);

  logic          run;
  logic [CW-1:0] steps;      // steps still to do
  logic [W-1:0]  shreg;      // bits of m still to shift in, MSB first
  logic [W:0]    rem;
  logic [W:0]    dbl;
  logic          in_bit;

  always_comb begin
    in_bit = shreg[W-1];
    dbl    = {rem[W-1:0], in_bit};
    if (dbl >= {1'b0, n}) dbl = dbl - {1'b0, n};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run   <= 1'b0;
      steps <= '0;
      shreg <= '0;
      rem   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          run   <= 1'b1;
          steps <= CW'(W) + CW'(k);
          shreg <= m;
          rem   <= '0;
        end
      end else if (steps == '0) begin
        run  <= 1'b0;
        done <= 1'b1;
      end else begin
        rem   <= dbl;
        shreg <= {shreg[W-2:0], 1'b0};
        steps <= steps - 1'b1;
      end
    end
  end

  assign res  = rem[W-1:0];
  assign busy = run;

endmodule
