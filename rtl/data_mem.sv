// data_mem: data memory of the CGRA.
//
// DEPTH words of DATA_W bits, byte addressed (the two low address bits are
// ignored, so word pointers advance by 4). It has one read/write port per
// row bus and one host port for loading inputs and reading results while
// the array is idle. Reads are synchronous: the word addressed in a cycle
// with ren appears on rdata after the next rising edge and stays there until
// the next read. Writes take effect at the rising edge. If several ports
// write the same word in one cycle, the highest row wins and the host port
// loses to every row. Addresses beyond DEPTH wrap. The memory's existence
// and its connection to the row buses come from the evaluated architecture;
// the port timing, size and priority are this design's choices.
module data_mem #(
  parameter int unsigned ROWS   = 4,
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ren   [ROWS],
  input  logic [DATA_W-1:0] raddr [ROWS],
  output logic [DATA_W-1:0] rdata [ROWS],
  input  logic              we    [ROWS],
  input  logic [DATA_W-1:0] waddr [ROWS],
  input  logic [DATA_W-1:0] wdata [ROWS],
  input  logic              host_we,
  input  logic              host_re,
  input  logic [DATA_W-1:0] host_addr,
  input  logic [DATA_W-1:0] host_wdata,
  output logic [DATA_W-1:0] host_rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  function automatic logic [AW-1:0] widx(input logic [DATA_W-1:0] a);
    return a[AW+1:2];
  endfunction

  always_ff @(posedge clk) begin
    if (host_we) mem[widx(host_addr)] <= host_wdata;
    for (int r = 0; r < ROWS; r++)
      if (we[r]) mem[widx(waddr[r])] <= wdata[r];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) rdata[r] <= '0;
      host_rdata <= '0;
    end else begin
      for (int r = 0; r < ROWS; r++)
        if (ren[r]) rdata[r] <= mem[widx(raddr[r])];
      if (host_re) host_rdata <= mem[widx(host_addr)];
    end
  end

endmodule
