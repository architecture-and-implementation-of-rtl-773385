// spi_master: 32-bit SPI master used by a parent node to reach its children.
//
// The control path of every slot is four single-ended lines: serial clock,
// MOSI, MISO and chip select. One transaction moves 32 bits each way, most
// significant bit first, in SPI mode 0 (clock idles low, both sides change
// data on the falling edge and sample on the rising edge). The serial clock
// is the system clock divided by 2*HALF_PERIOD. Chip selects are active low,
// one per slot; start picks the slot with slot_sel.
//
// Interface: start/slot_sel/tx_data -> busy, done (one-cycle pulse), rx_data;
// sclk, mosi, cs_n[SLOTS], miso.
// Timing: chip select to first rising edge, 63 further half periods and
// last falling edge to deselect take 65*HALF_PERIOD clocks; done is high
// 65*HALF_PERIOD + 1 clocks after the edge that takes start.
// The four-line SPI link and 32-bit transactions follow the document; the
// mode, bit order and clock rate are this design's own choices.
module spi_master #(
  parameter int unsigned SLOTS       = 8,
  parameter int unsigned HALF_PERIOD = 8
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         start,
  input  logic [$clog2(SLOTS)-1:0]     slot_sel,
  input  logic [31:0]                  tx_data,
  output logic                         busy,
  output logic                         done,
  output logic [31:0]                  rx_data,
  output logic                         sclk,
  output logic                         mosi,
  output logic [SLOTS-1:0]             cs_n,
  input  logic                         miso
);
  localparam int unsigned DW = $clog2(HALF_PERIOD + 1);

  typedef enum logic [1:0] {M_IDLE, M_SETUP, M_SHIFT, M_HOLD} mstate_t;
  mstate_t       st;
  logic [DW-1:0] div;
  logic [5:0]    bits;
  logic [31:0]   sh_tx, sh_rx;

  assign busy = (st != M_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= M_IDLE; div <= '0; bits <= '0; sh_tx <= '0; sh_rx <= '0;
      rx_data <= '0; done <= 1'b0; sclk <= 1'b0; mosi <= 1'b0; cs_n <= '1;
    end else begin
      done <= 1'b0;
      unique case (st)
        M_IDLE: if (start) begin
          cs_n           <= '1;
          cs_n[slot_sel] <= 1'b0;
          sh_tx  <= tx_data;
          mosi   <= tx_data[31];
          div    <= '0;
          bits   <= '0;
          st     <= M_SETUP;
        end
        M_SETUP: begin           // chip select to first rising edge
          if (div == DW'(HALF_PERIOD - 1)) begin
            div <= '0; sclk <= 1'b1; st <= M_SHIFT;
            sh_rx <= {sh_rx[30:0], miso};
          end else div <= div + 1'b1;
        end
        M_SHIFT: begin
          if (div == DW'(HALF_PERIOD - 1)) begin
            div <= '0;
            if (sclk) begin      // falling edge: next bit out
              sclk  <= 1'b0;
              bits  <= bits + 1'b1;
              sh_tx <= {sh_tx[30:0], 1'b0};
              mosi  <= sh_tx[30];
              if (bits == 6'd31) st <= M_HOLD;
            end else begin       // rising edge: sample
              sclk  <= 1'b1;
              sh_rx <= {sh_rx[30:0], miso};
            end
          end else div <= div + 1'b1;
        end
        M_HOLD: begin            // last falling edge to chip select release
          if (div == DW'(HALF_PERIOD - 1)) begin
            cs_n <= '1; rx_data <= sh_rx; done <= 1'b1; st <= M_IDLE; div <= '0;
          end else div <= div + 1'b1;
        end
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
