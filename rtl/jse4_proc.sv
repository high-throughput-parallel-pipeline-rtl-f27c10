// jse4_proc: J_SE4 / J_SE4^t basic processor of the even half of J_R8.
//
// Forward (fwd=1) rows: v0+v1, v0-v1, T2*v2+v3, T2*v3-v2.
// Inverse (fwd=0) rows: v0+v1, v0-v1, T2*v2-v3, T2*v3+v2 (the transpose).
// Every row has the form di*{1 or T2} +/- dj, so one configurable hardwired
// multiplier (hwmul_t2) computes one result per Clk2 cycle; the F/I input
// only changes the add/subtract control. Inputs and outputs are four serial
// words per vector. Framing in ser4_frame; latency 5 Clk2 cycles.
//
// Follows the original design: the matrix, its transpose under F/I and the
// serial-4 format. Own choice: the internal schedule and the latency.
module jse4_proc
  import dct_pkg::*;
#(
  parameter int W = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en2,
  input  logic         fwd,
  input  tag_t         in_tag,
  input  logic [W-1:0] in_d,
  output tag_t         out_tag,
  output logic [W-1:0] out_d
);
  logic [W-1:0] hold [1][4];
  logic [W-1:0] din  [1];
  logic [1:0]   oidx;
  tag_t         otag;
  logic [W-1:0] di, dj, res;
  logic         sel_t2, sub;

  assign din[0] = in_d;
  ser4_frame #(.W(W), .NS(1)) u_frame (
    .clk, .rst_n, .en2, .in_tag, .in_d(din), .hold, .oidx, .otag
  );

  always_comb begin
    case (oidx)
      2'd0:    begin di = hold[0][0]; dj = hold[0][1]; sel_t2 = 1'b0; sub = 1'b0; end
      2'd1:    begin di = hold[0][0]; dj = hold[0][1]; sel_t2 = 1'b0; sub = 1'b1; end
      2'd2:    begin di = hold[0][2]; dj = hold[0][3]; sel_t2 = 1'b1; sub = ~fwd; end
      default: begin di = hold[0][3]; dj = hold[0][2]; sel_t2 = 1'b1; sub = fwd;  end
    endcase
  end

  hwmul_t2 #(.DATA_W(W)) u_mul (.di, .dj, .sel_t2, .sub, .p(res));

  always_ff @(posedge clk) begin
    if (!rst_n) out_tag <= TAG_IDLE;
    else if (en2) out_tag <= otag;
  end
  always_ff @(posedge clk) if (en2) out_d <= res;
endmodule
