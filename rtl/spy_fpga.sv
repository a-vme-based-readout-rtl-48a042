// spy_fpga: the host-board FPGA (#1, #2 or #3) paired with one reduction
// FPGA. It records raw link data in three external SRAMs on request, lets
// the local bus read them back, and passes working parameters on to its
// reduction FPGA.
//
// Capture: writing CTRL with bit 0 set starts a capture of DEPTH beats;
// CTRL bit 1 (written at the same time, ignored while busy) picks the
// source. Raw source (bit 1 = 0): on every clock with a valid raw beat the
// 12 lanes' {k, byte} (9 bits each, the error bit is not stored) are
// written at the same address into the three 36-bit SRAMs: lanes 0-3 into
// SRAM 0, 4-7 into SRAM 1, 8-11 into SRAM 2, lane 4*j+m in bits
// 9*m+8..9*m. Zero-suppressed source (bit 1 = 1): every word transferred
// on the reduction FPGA's 64-bit bus to the merger (valid and ready high)
// is stored as SRAM 0 = data[35:0], SRAM 1 = {7'b0, last, data[63:36]},
// SRAM 2 = 0. WPTR counts the beats written.
//
// Local bus (21-bit longword address, valid held until a one-clock ack):
//   addr[20:19]=0 registers: 0 CTRL (bit0 start / busy, bit1 source), 1 DEPTH,
//                            2 WPTR (read only), 3 BANK, 4 ID (read only)
//   addr[20:19]=1 write forwarded to the reduction FPGA's private bus:
//                 cfg_addr = addr[15:0], cfg_data = wdata[15:0]
//   addr[20:19]=2 SRAM read at address addr[18:0] from the SRAM selected
//                 by BANK[1:0]: bits 31..0, or bits 35..32 when BANK[2]=1.
// SRAM reads are refused (read 32'hDEAD_0001) while a capture runs.
// The SRAM interface assumes a flow-through part: the address is
// registered by the SRAM on one clock and the data are sampled on the next.
// The SRAM count and size, the raw data storage and read-back through
// VME, the branch of the zero-suppressed bus into this FPGA, and the
// forwarding of parameters follow the document; the register
// map, storage layout and capture control are this design's.
module spy_fpga
  import esdcc_pkg::*;
#(
  parameter logic [31:0] ID_VALUE = 32'h5350_0001
) (
  input  logic                clk,
  input  logic                rst,
  // raw bus from the reduction FPGA
  input  logic [N_LINKS-1:0]  raw_valid,
  input  logic [RAW_W-1:0]    raw_data,
  // zero-suppressed bus towards the merger, observed only
  input  logic                zs_valid,
  input  logic                zs_ready,
  input  logic [ZS_W-1:0]     zs_data,
  input  logic                zs_last,
  // local bus slave
  input  logic                lb_valid,
  input  logic                lb_we,
  input  logic [20:0]         lb_addr,
  input  logic [31:0]         lb_wdata,
  output logic                lb_ack,
  output logic [31:0]         lb_rdata,
  // private bus to the reduction FPGA
  output logic                cfg_we,
  output logic [15:0]         cfg_addr,
  output logic [15:0]         cfg_data,
  // three synchronous SRAMs sharing address and write enable
  output logic [SRAM_AW-1:0]  sram_addr,
  output logic                sram_we,
  output logic [SRAM_W-1:0]   sram_wdata [3],
  input  logic [SRAM_W-1:0]   sram_rdata [3]
);
  logic               busy;
  logic               src_zs;       // capture source: 0 raw bus, 1 zs bus
  logic [SRAM_AW:0]   depth, wptr;
  logic [2:0]         bank;
  logic [1:0]         rd_wait;
  logic               rd_pend;

  wire beat = busy && (src_zs ? (zs_valid && zs_ready) : (raw_valid != '0));
  wire [1:0] space = lb_addr[20:19];

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; src_zs <= 1'b0; depth <= '0; wptr <= '0; bank <= '0;
      rd_wait <= '0; rd_pend <= 1'b0;
      lb_ack <= 1'b0; lb_rdata <= '0;
      cfg_we <= 1'b0; cfg_addr <= '0; cfg_data <= '0;
      sram_addr <= '0; sram_we <= 1'b0;
      for (int j = 0; j < 3; j++) sram_wdata[j] <= '0;
    end else begin
      lb_ack  <= 1'b0;
      cfg_we  <= 1'b0;
      sram_we <= 1'b0;

      // ------------------------------------------------------ capture
      if (beat) begin
        sram_we   <= 1'b1;
        sram_addr <= wptr[SRAM_AW-1:0];
        if (src_zs) begin
          sram_wdata[0] <= zs_data[35:0];
          sram_wdata[1] <= {7'b0, zs_last, zs_data[63:36]};
          sram_wdata[2] <= '0;
        end else begin
          for (int j = 0; j < 3; j++)
            for (int m = 0; m < 4; m++)
              sram_wdata[j][9*m +: 9] <= raw_data[LANE_W*(4*j+m) +: 9];
        end
        wptr <= wptr + 1'b1;
        if (wptr + 1'b1 >= depth) busy <= 1'b0;
      end

      // ---------------------------------------------------- local bus
      if (rd_pend) begin
        if (rd_wait != 0) rd_wait <= rd_wait - 1'b1;
        else begin
          rd_pend  <= 1'b0;
          lb_ack   <= 1'b1;
          lb_rdata <= bank[2] ? 32'(sram_rdata[bank[1:0]][35:32])
                              : sram_rdata[bank[1:0]][31:0];
        end
      end else if (lb_valid && !lb_ack) begin
        unique case (space)
          2'd0: begin
            lb_ack <= 1'b1;
            if (lb_we) begin
              unique case (lb_addr[2:0])
                3'd0: if (!busy) begin
                  src_zs <= lb_wdata[1];
                  if (lb_wdata[0] && depth != 0) begin
                    busy <= 1'b1;
                    wptr <= '0;
                  end
                end
                3'd1: depth <= lb_wdata[SRAM_AW:0];
                3'd3: bank  <= lb_wdata[2:0];
                default: ;
              endcase
            end else begin
              unique case (lb_addr[2:0])
                3'd0: lb_rdata <= {30'b0, src_zs, busy};
                3'd1: lb_rdata <= 32'(depth);
                3'd2: lb_rdata <= 32'(wptr);
                3'd3: lb_rdata <= 32'(bank);
                3'd4: lb_rdata <= ID_VALUE;
                default: lb_rdata <= '0;
              endcase
            end
          end
          2'd1: begin
            lb_ack <= 1'b1;
            lb_rdata <= '0;
            if (lb_we) begin
              cfg_we   <= 1'b1;
              cfg_addr <= lb_addr[15:0];
              cfg_data <= lb_wdata[15:0];
            end
          end
          2'd2: begin
            if (lb_we || busy || bank[1:0] == 2'd3) begin
              lb_ack   <= 1'b1;
              lb_rdata <= 32'hDEAD_0001;
            end else if (!beat) begin
              sram_addr <= lb_addr[SRAM_AW-1:0];
              rd_pend   <= 1'b1;
              rd_wait   <= 2'd1;
            end
          end
          default: begin
            lb_ack   <= 1'b1;
            lb_rdata <= 32'hDEAD_0002;
          end
        endcase
      end
    end
  end
endmodule
