`timescale 1ps/1ps
// delay_chain: N delay elements in series; taps[k-1] is the output of the
// k-th element, so a falling edge on a reaches taps[k-1] k * 50 ps later.
// Behavioural (built from the delay_element model).
module delay_chain #(
  parameter int unsigned N = 6
) (
  input  logic         a,
  output logic [N-1:0] taps
);
  for (genvar k = 0; k < N; k++) begin : g_el
    if (k == 0) begin : g_first
      delay_element u_el (.a(a), .y(taps[0]));
    end else begin : g_next
      delay_element u_el (.a(taps[k-1]), .y(taps[k]));
    end
  end
endmodule
