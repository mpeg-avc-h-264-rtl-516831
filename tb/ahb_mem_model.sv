// ahb_mem_model: behavioural model of the external frame-buffer memory seen
// through an AHB-Lite slave port (read only). Not synthesizable hardware of
// the design: it stands in for the SDRAM and the system bus in testbenches.
//
// A transfer whose address phase is accepted (HTRANS = NONSEQ with HREADY high)
// gets a data phase of 0..MAX_WAIT wait states (random), then HRDATA returns
// the little-endian 32-bit word at the byte address. `mem` is filled by the
// testbench through hierarchical references. `waits` counts wait-state cycles.
module ahb_mem_model #(
  parameter int unsigned SIZE     = 1 << 20,
  parameter int unsigned MAX_WAIT = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  output logic        hready,
  output logic [31:0] hrdata,
  output int          waits,
  output int          reads
);
  logic [7:0]  mem [SIZE];
  logic        dphase;
  int unsigned wcnt;
  logic [31:0] a;

  assign hready = !dphase || wcnt == 0;
  assign hrdata = dphase ? {mem[(a + 3) % SIZE], mem[(a + 2) % SIZE], mem[(a + 1) % SIZE], mem[a % SIZE]}
                         : 32'h0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dphase <= 1'b0;
      wcnt   <= 0;
      a      <= '0;
      waits  <= 0;
      reads  <= 0;
    end else begin
      if (dphase) begin
        if (wcnt != 0) begin
          wcnt  <= wcnt - 1;
          waits <= waits + 1;
        end else begin
          dphase <= 1'b0;
        end
      end
      if (hready && htrans == 2'b10) begin
        dphase <= 1'b1;
        a      <= haddr;
        wcnt   <= (MAX_WAIT == 0) ? 0 : $urandom_range(MAX_WAIT, 0);
        reads  <= reads + 1;
      end
    end
  end
endmodule
