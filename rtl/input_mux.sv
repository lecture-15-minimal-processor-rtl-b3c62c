// input_mux: brings one primary input into the datapath.
//
// Selects in[sel] out of N_IN one-bit inputs with a tree of 2:1
// multiplexers, one level per select bit (sel[0] picks within pairs at the
// first level). The READ instruction's In0 field is the select. N_IN = 8
// follows from the 3-bit field; the lecture does not give the number of
// inputs. An out-of-range select reads 0. Combinational.
module input_mux #(
  parameter int unsigned N_IN = 8,
  localparam int unsigned SW  = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic [N_IN-1:0] in,
  input  logic [SW-1:0]   sel,
  output logic            y
);
  localparam int unsigned NP = 1 << SW;  // inputs padded to a power of two

  logic [NP-1:0] padded;
  always_comb begin
    padded = '0;
    padded[N_IN-1:0] = in;
  end

  for (genvar l = 0; l < SW; l++) begin : g_lvl
    localparam int unsigned NI = NP >> l;        // signals into this level
    logic [NI-1:0]   src;
    logic [NI/2-1:0] o;
    if (l == 0) begin : g_first
      assign src = padded;
    end else begin : g_next
      assign src = g_lvl[l-1].o;
    end
    for (genvar k = 0; k < NI / 2; k++) begin : g_mux
      mux2 u_m (.s(sel[l]), .i0(src[2*k]), .i1(src[2*k+1]), .y(o[k]));
    end
  end

  assign y = g_lvl[SW-1].o[0];
endmodule
