// delay_line: D-stage register pipeline for a data word and its valid bit.
//
// Used to skew matrix operands into a systolic array and to de-skew results
// coming out of it. D = 0 is a straight wire. Valid bits are reset; data
// registers load on every cycle.
module delay_line #(
  parameter int unsigned W = 8,
  parameter int unsigned D = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_vld,
  input  logic [W-1:0] in_data,
  output logic         out_vld,
  output logic [W-1:0] out_data
);

  if (D == 0) begin : g_wire
    assign out_vld  = in_vld;
    assign out_data = in_data;
  end else begin : g_regs
    logic [W-1:0] data_q [D];
    logic         vld_q  [D];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int s = 0; s < int'(D); s++) vld_q[s] <= 1'b0;
      end else begin
        vld_q[0] <= in_vld;
        for (int s = 1; s < int'(D); s++) vld_q[s] <= vld_q[s-1];
      end
    end
    always_ff @(posedge clk) begin
      data_q[0] <= in_data;
      for (int s = 1; s < int'(D); s++) data_q[s] <= data_q[s-1];
    end
    assign out_vld  = vld_q[D-1];
    assign out_data = data_q[D-1];
  end

endmodule
