// vme_slave: VME64x slave access to the FED's configuration and status
// registers, used by the crate computer to control the card and load
// calibration constants.
//
// The card's A32 base address comes from the VME64x geographic address pins:
// address bits 31:27 must equal the slot number (GA, pins active low). A slot
// whose pins GA and GAP together have even parity is invalid and the
// board does not respond. Single D32 cycles with address modifier 0x09 or 0x0D
// are accepted. The strobes are synchronised to the 160 MHz clock; a write
// produces one cfg_we pulse, a read one cfg_re and the data sampled
// CFG_RD_LAT clocks later; dtack_n is then held low until the master releases
// the data strobes. Internal word address = VME address bits 25:2.
// The document asks for a VME64x A32/D64 master/slave with interrupts, DMA
// and geographic addressing; this block provides the geographic addressing
// and the single-cycle D32 slave, with the interrupt request driven elsewhere.
module vme_slave #(
  parameter int CFG_RD_LAT = 3
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  ga_n,
  input  logic        gap_n,
  input  logic        as_n,
  input  logic [1:0]  ds_n,
  input  logic        write_n,
  input  logic        lword_n,
  input  logic [5:0]  am,
  input  logic [31:1] addr,
  input  logic [31:0] data_in,
  output logic [31:0] data_out,
  output logic        data_oe,
  output logic        dtack_n,
  // configuration bus
  output logic        cfg_we,
  output logic        cfg_re,
  output logic [23:0] cfg_addr,
  output logic [31:0] cfg_wdata,
  input  logic [31:0] cfg_rdata
);
  typedef enum logic [1:0] {IDLE, RWAIT, ACK} st_e;
  st_e st;
  logic [1:0] as_s, ds0_s, ds1_s;
  logic [3:0] wait_cnt;

  wire [4:0] slot    = ~ga_n;
  wire       ga_ok   = ^{ga_n, gap_n};      // odd parity over the pins: valid slot
  wire       strobe  = !as_s[1] && !ds0_s[1] && !ds1_s[1];
  wire       am_ok   = (am == 6'h09) || (am == 6'h0D);
  wire       hit     = ga_ok && am_ok && !lword_n && !addr[1] && (addr[31:27] == slot);
  wire       ds_idle = ds0_s[1] && ds1_s[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      as_s <= '1; ds0_s <= '1; ds1_s <= '1;
      st <= IDLE; wait_cnt <= '0; dtack_n <= 1'b1; data_oe <= 1'b0; data_out <= '0;
      cfg_we <= 1'b0; cfg_re <= 1'b0; cfg_addr <= '0; cfg_wdata <= '0;
    end else begin
      as_s  <= {as_s[0], as_n};
      ds0_s <= {ds0_s[0], ds_n[0]};
      ds1_s <= {ds1_s[0], ds_n[1]};
      cfg_we <= 1'b0;
      cfg_re <= 1'b0;
      case (st)
        IDLE: if (strobe && hit) begin
          cfg_addr <= addr[25:2];
          if (!write_n) begin
            cfg_wdata <= data_in;
            cfg_we <= 1'b1;
            dtack_n <= 1'b0;
            st <= ACK;
          end else begin
            cfg_re <= 1'b1;
            wait_cnt <= 4'(CFG_RD_LAT);
            st <= RWAIT;
          end
        end
        RWAIT: begin
          if (wait_cnt == 4'd0) begin
            data_out <= cfg_rdata;
            data_oe <= 1'b1;
            dtack_n <= 1'b0;
            st <= ACK;
          end else wait_cnt <= wait_cnt - 1'b1;
        end
        ACK: if (ds_idle) begin
          dtack_n <= 1'b1;
          data_oe <= 1'b0;
          st <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
