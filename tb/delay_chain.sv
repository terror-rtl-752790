// delay_chain: behavioural model of the inverter chain that derives a late
// copy of the clock (ckd, ckdd) at a link buffer.  Not synthesizable: every
// edge of 'in' reappears on 'out' DLY time units later (DLY may exceed half a clock period but must be below a
// full period).
module delay_chain #(
  parameter int DLY = 500
) (
  input  logic in,
  output logic out
);
  initial out = 1'b0;
  always @(posedge in) begin
    #(DLY);
    out = 1'b1;
  end
  always @(negedge in) begin
    #(DLY);
    out = 1'b0;
  end
endmodule
