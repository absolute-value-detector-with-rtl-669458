// Word-wide 2-to-1 data selector with an active-low strobe, the function of
// a 74LS157-type quad selector (four 2-to-1 channels, one shared select).
//
// y = strobe_n ? 0 : (sel ? b : a). With strobe_n high every output is held
// low, as on the 74LS157. Combinational, no clock. The A/B select and the
// strobe follow the part the design uses; the width parameter is this
// implementation's choice (default 4, the part's four channels).
module quad_mux2 #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,         // selected when sel = 0
  input  logic [WIDTH-1:0] b,         // selected when sel = 1
  input  logic             sel,       // select: 0 = a, 1 = b
  input  logic             strobe_n,  // active-low enable; 1 forces y = 0
  output logic [WIDTH-1:0] y          // selected word
);
  always_comb begin
    if (strobe_n) y = '0;
    else if (sel) y = b;
    else          y = a;
  end
endmodule
