// apu_ports: the four byte-wide I/O ports between the main CPU and the
// SPC700 sound CPU (B-bus 0x40-0x43, CPU addresses 0x2140-0x2143).
//
// Each port is two latches: a byte the CPU writes is read by the SPC700,
// and a byte the SPC700 writes is read by the CPU. Both sides write on the
// clock edge and read combinationally. The SPC700 side reset clears both
// latches. The register addresses follow the document; mirroring of the
// ports over B-bus 0x40-0x7F and the two-latch structure are this design's
// choice.
module apu_ports (
  input  logic       clk,
  input  logic       rst,
  // CPU side (B-bus)
  input  logic [7:0] b_addr,
  input  logic       b_wr,
  input  logic [7:0] b_wdata,
  output logic [7:0] b_rdata,
  output logic       b_sel,
  // SPC700 side
  input  logic [1:0] spc_port,
  input  logic       spc_wr,
  input  logic [7:0] spc_wdata,
  output logic [7:0] spc_rdata
);
  logic [7:0] to_apu [4];
  logic [7:0] to_cpu [4];

  assign b_sel = b_addr[7:6] == 2'b01;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 4; i++) begin to_apu[i] <= '0; to_cpu[i] <= '0; end
    end else begin
      if (b_wr && b_sel) to_apu[b_addr[1:0]] <= b_wdata;
      if (spc_wr)        to_cpu[spc_port]    <= spc_wdata;
    end
  end

  assign b_rdata   = to_cpu[b_addr[1:0]];
  assign spc_rdata = to_apu[spc_port];
endmodule
