// unicast_unit: delivers a single-destination message to one VPU of the PE.
//
// The VPU index of the message is decoded into a one-hot write-enable vector over the
// NUM_VPU VPUs of the PE; an index outside the PE gives no write enable. Purely combinational.
// The GraphWave architecture names the unit and its job; the decoder is this design's implementation.
module unicast_unit #(
  parameter int NUM_VPU = 256,
  parameter int IDX_W   = 16
) (
  input  logic             en,
  input  logic [IDX_W-1:0] idx,
  output logic [NUM_VPU-1:0] we
);
  always_comb begin
    we = '0;
    for (int i = 0; i < NUM_VPU; i++)
      we[i] = en && (idx == IDX_W'(i));
  end
endmodule
