// doi_unit: decay-time measure for depth-of-interaction in a phoswich.
//
// In a phoswich the crystal layers differ in scintillation decay time, so the
// share of a pulse's energy arriving late in the window tells the layers
// apart. This unit integrates the energy Ex + Ey of the delayed samples whose
// position in the gate is at or beyond `doi_start` (the tail). With the total
// IEx + IEy from the integrator, the ratio tail/total is the decay measure;
// the division is left to software. The tail sum saturates at DOI_W bits.
// On `gate_last` the result is registered and `done` pulses one clock later,
// in step with the integrator. The published design asks for "a measure of
// the decay time"; the tail-integral method is this design's own choice.
module doi_unit
  import pet_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              gate,
  input  logic              gate_last,
  input  logic [EN_W-1:0]   ex,
  input  logic [EN_W-1:0]   ey,
  input  logic [7:0]        doi_start,
  output logic [DOI_W-1:0]  doi,
  output logic              done
);
  localparam int unsigned SUM_W = ETOT_W + 8;
  logic [7:0]       idx;       // position of the current sample in the gate
  logic             in_win;
  logic [SUM_W-1:0] acc, nacc;
  logic [7:0]       cur;

  always_comb begin
    cur  = in_win ? idx : 8'd0;
    nacc = (in_win ? acc : '0)
         + ((cur >= doi_start) ? SUM_W'(ex) + SUM_W'(ey) : '0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      idx <= '0; in_win <= 1'b0; acc <= '0; doi <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (gate) begin
        acc    <= nacc;
        idx    <= cur + 8'd1;
        in_win <= !gate_last;
        if (gate_last) begin
          doi  <= (nacc > SUM_W'({DOI_W{1'b1}})) ? '1 : nacc[DOI_W-1:0];
          done <= 1'b1;
        end
      end
    end
  end
endmodule
