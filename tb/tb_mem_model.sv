// tb_mem_model: behavioural model of the external frame memory, for
// testbenches only (the memory and its controller are outside the design).
//
// Word-addressed, 32-bit words, 2**MEM_AW of them (addresses wrap). A
// request is granted unless the model stalls that cycle: at random with
// probability STALL_PCT percent, and, when BURSTS is set, in refresh-like
// bursts of 24 cycles every 400 cycles. A granted write is stored at once;
// a granted read returns its data with rvalid 2 to 4 cycles after the
// cycle of its grant. The testbench reads and writes the array `mem`
// directly and may read the counters n_stall (requests held off) and
// n_reads / n_writes.
module tb_mem_model #(
  parameter int ADDR_W    = 25,
  parameter int MEM_AW    = 16,
  parameter int STALL_PCT = 20,
  parameter bit BURSTS    = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [31:0]       wdata,
  output logic              gnt,
  output logic              rvalid,
  output logic [31:0]       rdata
);
  logic [31:0] mem [1 << MEM_AW];
  int          n_stall = 0, n_reads = 0, n_writes = 0;
  longint      cyc = 0;
  bit          stall;
  int          pend_lat;      // cycles left until the pending read returns, 0 = none
  logic [31:0] pend_data;

  assign gnt = req && !stall;

  always @(negedge clk) begin
    stall <= ($urandom_range(0, 99) < STALL_PCT) || (BURSTS && (cyc % 400) < 24);
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid   <= 1'b0;
      rdata    <= '0;
      pend_lat <= 0;
    end else begin
      cyc++;
      rvalid <= 1'b0;
      if (req && !gnt) n_stall++;
      if (pend_lat == 1) begin
        rvalid   <= 1'b1;
        rdata    <= pend_data;
      end
      if (pend_lat > 0) pend_lat <= pend_lat - 1;
      if (gnt && we) begin
        mem[addr[MEM_AW-1:0]] <= wdata;
        n_writes++;
      end else if (gnt) begin
        if (pend_lat > 0) $error("second read while one is pending");
        pend_data <= mem[addr[MEM_AW-1:0]];
        pend_lat  <= $urandom_range(1, 3);
        n_reads++;
      end
    end
  end
endmodule
