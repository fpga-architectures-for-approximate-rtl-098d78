// depth_buffer: on-chip (block RAM) cache of one depth frame.
//
// The compute units read the depth frame many times per frame (every ICP
// iteration, every voxel column), so it is loaded once from the producing
// stream and then served from on-chip memory. Writes arrive as a raster
// stream: frame_start resets the write address, each wr_valid stores wr_data
// at the next address. NREAD independent read ports each return the word at
// rd_addr one cycle after it is presented (synchronous read). Several read
// ports correspond to a partitioned/replicated memory, one copy per compute
// unit. wr_count shows how many pixels of the current frame are stored.
//
// Own choices: the write-stream interface and the single-cycle read latency.
module depth_buffer
  import kf_pkg::*;
#(
  parameter int W     = 320,
  parameter int H     = 240,
  parameter int NREAD = 1,
  localparam int N    = W * H,
  localparam int AW   = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                frame_start,
  input  logic                wr_valid,
  input  depth_t              wr_data,
  output logic [AW:0]         wr_count,
  input  logic [NREAD-1:0][AW-1:0] rd_addr,
  output depth_t [NREAD-1:0]  rd_data
);
  depth_t mem [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                      wr_count <= '0;
    else if (frame_start)                            wr_count <= '0;
    else if (wr_valid && wr_count < (AW+1)'(N))      wr_count <= wr_count + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_valid && !frame_start && wr_count < (AW+1)'(N))
      mem[wr_count[AW-1:0]] <= wr_data;
  end

  for (genvar p = 0; p < NREAD; p++) begin : g_rd
    always_ff @(posedge clk)
      rd_data[p] <= mem[rd_addr[p]];
  end

endmodule
