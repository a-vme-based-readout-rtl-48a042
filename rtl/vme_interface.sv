// vme_interface: the VME64x slave / local bus controller (FPGA #5).
//
// It answers single-cycle A32/D32 data transfers (address modifiers 0x09
// and 0x0D) addressed to its slot: VME64x geographic addressing gives the
// slot number on the active-low GA pins, and the board occupies the
// 128 MB window whose A[31:27] equal the slot number. The longword
// address A[26:2] becomes the 25-bit local bus address.
//
// Timing: AS*, DS0*/DS1* and WRITE* are synchronised with two flip-flops.
// When both data strobes are low in a selected cycle, one local bus
// transaction starts (`lb_valid` held until the one-clock `lb_ack`).
// After the ack DTACK* goes low; for a read `vme_data_out` holds the read
// word and `vme_data_oe` enables the board's data drivers. DTACK* and the
// drivers are released when the master raises the data strobes. The
// parity pin GAP* is not checked, and block transfers, A24/A16, D16/D8 and
// CR/CSR space are not handled.
// The role of the block (VME64x slave, master of the local bus joining all
// on-board FPGAs) follows the document; the cycle subset, address window
// and handshake are this design's.
module vme_interface
  import esdcc_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  // VME64x bus (active-low strobes)
  input  logic             vme_as_n,
  input  logic [1:0]       vme_ds_n,
  input  logic             vme_write_n,
  input  logic             vme_lword_n,
  input  logic [5:0]       vme_am,
  input  logic [31:1]      vme_addr,
  input  logic [31:0]      vme_data_in,
  output logic [31:0]      vme_data_out,
  output logic             vme_data_oe,
  output logic             vme_dtack_n,
  input  logic [4:0]       vme_ga_n,
  // local bus master
  output logic             lb_valid,
  output logic             lb_we,
  output logic [LB_AW-1:0] lb_addr,
  output logic [31:0]      lb_wdata,
  input  logic             lb_ack,
  input  logic [31:0]      lb_rdata
);
  typedef enum logic [1:0] {V_IDLE, V_BUS, V_ACK} vstate_e;
  vstate_e    state;
  logic [1:0] as_s, ds_s;   // synchronisers: [1] is the usable value
  logic [1:0] ds1_s;

  wire as_on = as_s[1];
  wire ds_on = ds_s[1] && ds1_s[1];
  wire am_ok = (vme_am == 6'h09) || (vme_am == 6'h0D);
  wire hit   = (vme_addr[31:27] == ~vme_ga_n) && am_ok && !vme_lword_n && !vme_addr[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      as_s <= '0; ds_s <= '0; ds1_s <= '0;
    end else begin
      as_s  <= {as_s[0], !vme_as_n};
      ds_s  <= {ds_s[0], !vme_ds_n[0]};
      ds1_s <= {ds1_s[0], !vme_ds_n[1]};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= V_IDLE; lb_valid <= 1'b0; lb_we <= 1'b0; lb_addr <= '0; lb_wdata <= '0;
      vme_data_out <= '0; vme_data_oe <= 1'b0; vme_dtack_n <= 1'b1;
    end else begin
      unique case (state)
        V_IDLE: if (as_on && ds_on && hit) begin
          lb_valid <= 1'b1;
          lb_we    <= !vme_write_n;
          lb_addr  <= vme_addr[26:2];
          lb_wdata <= vme_data_in;
          state    <= V_BUS;
        end
        V_BUS: if (lb_ack) begin
          lb_valid     <= 1'b0;
          vme_data_out <= lb_rdata;
          vme_data_oe  <= !lb_we;
          vme_dtack_n  <= 1'b0;
          state        <= V_ACK;
        end
        V_ACK: if (!ds_s[1] && !ds1_s[1]) begin
          vme_dtack_n <= 1'b1;
          vme_data_oe <= 1'b0;
          state       <= V_IDLE;
        end
        default: state <= V_IDLE;
      endcase
    end
  end

  a_one_txn: assert property (@(posedge clk) disable iff (rst) lb_ack |-> lb_valid)
    else $error("vme_interface: ack without a request");
endmodule
