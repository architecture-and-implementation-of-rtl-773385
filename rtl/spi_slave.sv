// spi_slave: 32-bit SPI slave of a child node.
//
// The serial clock, MOSI and chip select from the parent are synchronized to
// the node's own clock (all boards share the distributed CLK, and the serial
// clock is much slower) and their edges are detected there. On the falling
// edge of cs_n the word in tx_word is loaded for sending; bits are sampled on
// rising serial-clock edges and the next MISO bit is driven after falling
// edges, most significant bit first (SPI mode 0). When cs_n rises after
// exactly 32 bits the received word is delivered with rx_valid; a transfer
// of any other length is dropped. miso_oe tells when the slot drives MISO.
//
// Interface: sclk, mosi, cs_n, miso, miso_oe; tx_word (word for the next
// transaction, sampled at cs_n fall, which tx_taken marks); rx_valid (one-cycle pulse), rx_word.
// Timing: rx_valid comes 3-4 clocks after cs_n rises; the serial clock half
// period must be at least 4 clocks.
// The SPI link follows the document; the oversampling implementation is this
// design's own.
module spi_slave (
  input  logic        clk,
  input  logic        rst,
  input  logic        sclk,
  input  logic        mosi,
  input  logic        cs_n,
  output logic        miso,
  output logic        miso_oe,
  input  logic [31:0] tx_word,
  output logic        tx_taken,
  output logic        rx_valid,
  output logic [31:0] rx_word
);
  logic [2:0]  sclk_s, cs_s;
  logic [1:0]  mosi_s;
  logic [31:0] sh_rx, sh_tx;
  logic [5:0]  nbits;
  logic        sel;

  assign sel     = !cs_s[1];
  assign miso    = sh_tx[31];
  assign miso_oe = sel;

  always_ff @(posedge clk) begin
    if (rst) begin
      sclk_s <= '0; cs_s <= '1; mosi_s <= '0;
      sh_rx <= '0; sh_tx <= '0; nbits <= '0; rx_valid <= 1'b0; rx_word <= '0;
      tx_taken <= 1'b0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      cs_s   <= {cs_s[1:0], cs_n};
      mosi_s <= {mosi_s[0], mosi};
      rx_valid <= 1'b0;
      tx_taken <= 1'b0;
      if (cs_s[2] && !cs_s[1]) begin          // select: load reply
        sh_tx <= tx_word;
        tx_taken <= 1'b1;
        nbits <= '0;
      end else if (sel && !sclk_s[2] && sclk_s[1]) begin   // rising: sample
        sh_rx <= {sh_rx[30:0], mosi_s[1]};
        nbits <= nbits + 1'b1;
      end else if (sel && sclk_s[2] && !sclk_s[1]) begin   // falling: shift
        sh_tx <= {sh_tx[30:0], 1'b0};
      end else if (!cs_s[2] && cs_s[1]) begin  // deselect
        if (nbits == 6'd32) begin
          rx_valid <= 1'b1;
          rx_word  <= sh_rx;
        end
      end
    end
  end
endmodule
