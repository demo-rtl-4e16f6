// bf_axi_lite: AXI4-Lite slave through which the host loads the beamformer.
//
// The beamformer sits on the system's AXI interconnect as a slave; the host
// writes echo samples, steering coefficients and apodization masks into its
// memories. This design's address map (byte address, ADDR_W bits): the top
// three bits select a region (bf_pkg::region_e), bits [ADDR_W-4:2] are the word
// offset inside it, decoded by the owner of each memory. Writes are one word
// each; write strobes are ignored (whole words only).
//
// Memory writes must not overlap a voxel in flight: a write, once both its
// address and data are in, waits until core_idle, then leaves as a one-cycle
// mem_we pulse and is answered on B. While an address is held, write_pending
// is high and the top stops accepting voxel requests, so the pipeline drains.
// A write to the control region or an unused region is answered SLVERR and
// changes nothing. Reads return the control registers (ID, status, voxel
// count); reads of the memories answer SLVERR. AW and W may arrive in either
// order; one transaction of each kind is handled at a time.
module bf_axi_lite
  import bf_pkg::*;
#(
  parameter int ADDR_W = 24,
  localparam int OFF_W = ADDR_W - 5
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  output logic [1:0]        s_axi_bresp,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  // memory write bus
  output logic              mem_we,
  output region_e           mem_region,
  output logic [OFF_W-1:0]  mem_offset,
  output logic [31:0]       mem_wdata,
  // core handshake and status
  input  logic              core_idle,
  output logic              write_pending,
  input  logic [31:0]       voxel_count
);
  logic              aw_full, w_full;
  logic [ADDR_W-1:0] aw_addr;
  logic [31:0]       w_data;
  region_e           aw_region;
  logic              aw_is_mem;

  assign aw_region = region_e'(aw_addr[ADDR_W-1 -: 3]);
  assign aw_is_mem = aw_region inside {REG_APOD, REG_C2, REG_C1, REG_ECHO};

  assign s_axi_awready = !aw_full;
  assign s_axi_wready  = !w_full;

  // the write is carried out in the cycle it fires
  logic fire;
  assign fire = aw_full && w_full && !s_axi_bvalid && (core_idle || !aw_is_mem);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      aw_full      <= 1'b0;
      w_full       <= 1'b0;
      s_axi_bvalid <= 1'b0;
      s_axi_bresp  <= RESP_OKAY;
    end else begin
      if (s_axi_awvalid && s_axi_awready) aw_full <= 1'b1;
      if (s_axi_wvalid && s_axi_wready)   w_full  <= 1'b1;
      if (fire) begin
        aw_full      <= 1'b0;
        w_full       <= 1'b0;
        s_axi_bvalid <= 1'b1;
        s_axi_bresp  <= aw_is_mem ? RESP_OKAY : RESP_SLVERR;
      end else if (s_axi_bvalid && s_axi_bready) begin
        s_axi_bvalid <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (s_axi_awvalid && s_axi_awready) aw_addr <= s_axi_awaddr;
    if (s_axi_wvalid && s_axi_wready)   w_data  <= s_axi_wdata;
  end

  assign mem_we        = fire && aw_is_mem;
  assign mem_region    = aw_region;
  assign mem_offset    = aw_addr[ADDR_W-4:2];
  assign mem_wdata     = w_data;
  assign write_pending = aw_full;

  // read channel: control registers only
  region_e    ar_region;
  logic [3:0] ar_word;
  assign ar_region     = region_e'(s_axi_araddr[ADDR_W-1 -: 3]);
  assign ar_word       = s_axi_araddr[5:2];
  assign s_axi_arready = !s_axi_rvalid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
      s_axi_rresp  <= RESP_OKAY;
    end else if (s_axi_arvalid && s_axi_arready) begin
      s_axi_rvalid <= 1'b1;
      s_axi_rresp  <= RESP_OKAY;
      s_axi_rdata  <= '0;
      if (ar_region != REG_CTRL || s_axi_araddr[ADDR_W-4:6] != '0) begin
        s_axi_rresp <= RESP_SLVERR;
      end else begin
        case (ar_word)
          CTRL_ID:     s_axi_rdata <= BF_ID;
          CTRL_STATUS: s_axi_rdata <= {30'd0, write_pending, !core_idle};
          CTRL_VOXELS: s_axi_rdata <= voxel_count;
          default:     s_axi_rresp <= RESP_SLVERR;
        endcase
      end
    end else if (s_axi_rvalid && s_axi_rready) begin
      s_axi_rvalid <= 1'b0;
    end
  end

  // AXI rule: a valid is held, with its payload, until it is accepted
  a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_awvalid && !s_axi_awready |=> s_axi_awvalid && $stable(s_axi_awaddr));
  a_w_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_wvalid && !s_axi_wready |=> s_axi_wvalid && $stable(s_axi_wdata));
  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_arvalid && !s_axi_arready |=> s_axi_arvalid && $stable(s_axi_araddr));

  logic unused_strb;
  assign unused_strb = ^s_axi_wstrb;

endmodule
