// qdr_model: behavioural model of three QDR-II SRAM modules behind their
// memory controller, seen from the controller's user side. One request per
// cycle to the same address in all three modules; a write stores the slots
// whose write enable is set, a read returns all three slots RL cycles later,
// in order, on rvalid. Contents start at random values, as real SRAM does.
// Test-bench only.
module qdr_model
  import qdr_pkg::*;
#(
  parameter int unsigned AW = 9,
  parameter int unsigned RL = 4
) (
  input  logic                 clk,
  input  logic                 req,
  input  logic [NSLOTS-1:0]    we,
  input  logic [AW-1:0]        addr,
  input  logic [NSLOTS*QW-1:0] wdata,
  output logic                 rvalid,
  output logic [NSLOTS*QW-1:0] rdata
);
  logic [QW-1:0] mem [NSLOTS][2**AW];
  logic                 v_pipe [RL];
  logic [NSLOTS*QW-1:0] d_pipe [RL];

  initial begin
    for (int s = 0; s < int'(NSLOTS); s++)
      for (int a = 0; a < 2**AW; a++)
        for (int k = 0; k < int'(QW); k += 32) mem[s][a][k +: 16] = 16'($urandom);
    for (int i = 0; i < int'(RL); i++) begin v_pipe[i] = 1'b0; d_pipe[i] = '0; end
  end

  always @(posedge clk) begin
    for (int i = int'(RL) - 1; i > 0; i--) begin v_pipe[i] <= v_pipe[i-1]; d_pipe[i] <= d_pipe[i-1]; end
    v_pipe[0] <= req && we == '0;
    for (int s = 0; s < int'(NSLOTS); s++) begin
      d_pipe[0][QW*s +: QW] <= mem[s][addr];
      if (req && we[s]) mem[s][addr] <= wdata[QW*s +: QW];
    end
  end
  assign rvalid = v_pipe[RL-1];
  assign rdata  = d_pipe[RL-1];
endmodule
