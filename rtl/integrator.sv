// integrator: the Sigma stage, integrating x, y, Ex and Ey over the gate.
//
// Four accumulators add the delayed sample on every cycle where `gate` is
// high; the first gated sample restarts them. On `gate_last` the four sums
// (Ix, Iy, IEx, IEy) are registered on the outputs and `done` pulses one
// clock later. Sums are INT_W bits, enough for 128 samples of full-scale
// input (11 + 7 bits), and wrap beyond that. The published design gives the
// four integrals; the widths are this design's own choice.
module integrator
  import pet_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    gate,
  input  logic                    gate_last,
  input  anger_t                  din,
  output logic signed [INT_W-1:0] ix,
  output logic signed [INT_W-1:0] iy,
  output logic        [INT_W-1:0] iex,
  output logic        [INT_W-1:0] iey,
  output logic                    done
);
  logic signed [INT_W-1:0] ax, ay;
  logic        [INT_W-1:0] aex, aey;
  logic signed [INT_W-1:0] nx, ny;
  logic        [INT_W-1:0] nex, ney;
  logic                    in_win;

  always_comb begin
    nx  = (in_win ? ax  : '0) + INT_W'(din.x);
    ny  = (in_win ? ay  : '0) + INT_W'(din.y);
    nex = (in_win ? aex : '0) + INT_W'(din.ex);
    ney = (in_win ? aey : '0) + INT_W'(din.ey);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      {ax, ay, aex, aey} <= '0;
      {ix, iy, iex, iey} <= '0;
      in_win <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (gate) begin
        {ax, ay, aex, aey} <= {nx, ny, nex, ney};
        in_win <= !gate_last;
        if (gate_last) begin
          {ix, iy, iex, iey} <= {nx, ny, nex, ney};
          done <= 1'b1;
        end
      end
    end
  end
endmodule
