// fault_status_reg: the N-bit fault status (error information) register and
// the multiplexer controls derived from it.
//
// Bit b_i (bit i-1 of `status`) is 1 when the unit doing the work of digit
// position i has been diagnosed as permanently faulty. All bits reset to 0.
// When `load` is high the diagnosis vector is ORed in at the clock edge.
// The controls are the running OR C_i = b_1 | b_2 | ... | b_i: they are 0
// below the lowest faulty position and 1 from it upward, which is what the
// unit array needs to move the work of every position from the faulty one up
// by one unit. `ctl` is combinational from the register.
// The register, its reset to zero and the running-sum rule for the controls
// follow the original description (the sum read as a logical OR); loading
// only confirmed diagnoses, ORed in, is this implementation's choice.
module fault_status_reg #(
  parameter int unsigned N = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] diag,
  output logic [N-1:0] status,
  output logic [N-1:0] ctl
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    status <= '0;
    else if (load) status <= status | diag;
  end

  always_comb begin
    logic acc;
    acc = 1'b0;
    for (int i = 0; i < N; i++) begin
      acc    = acc | status[i];
      ctl[i] = acc;
    end
  end

endmodule
