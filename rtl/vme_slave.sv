// vme_slave: VME64x slave interface of the ROD controller link. It answers
// D32 single cycles and block transfers in A32 space and D32 single cycles
// in the A24 CR/CSR space selected by the slot's geographic address. A32
// accesses whose top address byte equals the base programmed through CR/CSR
// become accesses on a simple internal bus (byte offset bus_addr = A[23:0],
// bus_we/bus_re, completion by bus_ack with bus_rdata for reads); DTACK is
// asserted after the completion and released when the master releases its
// data strobes. In a block transfer the address advances by 4 per data
// strobe while AS stays asserted. Address modifiers: 0x09/0x0D single A32,
// 0x0B/0x0F A32 block transfer, 0x2F CR/CSR. Strobes are synchronised with
// two flops; address, data and AM are taken while AS/DS are asserted, as the
// VME timing guarantees they are stable. The supported cycles follow the ROD
// description; the CR/CSR contents are reduced to this design's minimum:
// read at 0x1C returns 'C' and at 0x20 returns 'R' (bits [7:0]), and 0x7FF60
// holds the A32 base byte (A32 answers only after it has been written).
// Bus signals are active low as on the backplane (the _n names).
module vme_slave (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  ga,
  input  logic        as_n,
  input  logic [1:0]  ds_n,
  input  logic        write_n,
  input  logic [5:0]  am,
  input  logic [31:2] a,
  input  logic [31:0] d_in,
  output logic [31:0] d_out,
  output logic        d_oe,
  output logic        dtack_n,
  output logic [23:0] bus_addr,
  output logic [31:0] bus_wdata,
  output logic        bus_we,
  output logic        bus_re,
  input  logic [31:0] bus_rdata,
  input  logic        bus_ack
);
  logic [1:0] as_s, ds_s0, ds_s1;
  logic as_a, ds_a;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin as_s <= '1; ds_s0 <= '1; ds_s1 <= '1; end
    else begin as_s <= {as_s[0], as_n}; ds_s0 <= {ds_s0[0], ds_n[0]}; ds_s1 <= {ds_s1[0], ds_n[1]}; end
  end
  assign as_a = !as_s[1];
  assign ds_a = !ds_s0[1] && !ds_s1[1];

  typedef enum logic [2:0] {V_IDLE, V_DS, V_WAIT, V_ACK, V_END} st_t;
  st_t st;
  logic        csr, blt, wr;
  logic [23:0] off;
  logic [7:0]  base;
  logic        base_ok;

  logic        is_a32, is_blt, is_csr;
  assign is_a32 = (am == 6'h09 || am == 6'h0D || am == 6'h0B || am == 6'h0F);
  assign is_blt = (am == 6'h0B || am == 6'h0F);
  assign is_csr = (am == 6'h2F);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= V_IDLE; csr <= 1'b0; blt <= 1'b0; wr <= 1'b0; off <= '0; base <= '0; base_ok <= 1'b0;
      d_out <= '0; d_oe <= 1'b0; dtack_n <= 1'b1;
      bus_addr <= '0; bus_wdata <= '0; bus_we <= 1'b0; bus_re <= 1'b0;
    end else begin
      bus_we <= 1'b0; bus_re <= 1'b0;
      unique case (st)
        V_IDLE: if (as_a) begin
          if (is_a32 && base_ok && a[31:24] == base) begin
            csr <= 1'b0; blt <= is_blt; off <= {a[23:2], 2'b00}; st <= V_DS;
          end else if (is_csr && a[23:19] == ga) begin
            csr <= 1'b1; blt <= 1'b0; off <= {5'h0, a[18:2], 2'b00}; st <= V_DS;
          end else st <= V_END;             // not for us: wait for AS release
        end
        V_DS: begin
          if (!as_a) st <= V_IDLE;
          else if (ds_a) begin
            wr <= !write_n;
            if (csr) begin
              if (!write_n) begin
                if (off == 24'h07FF60) begin base <= d_in[7:0]; base_ok <= 1'b1; end
              end else begin
                d_out <= (off == 24'h00001C) ? 32'h43 :
                         (off == 24'h000020) ? 32'h52 :
                         (off == 24'h07FF60) ? 32'(base) : 32'h0;
                d_oe <= 1'b1;
              end
              dtack_n <= 1'b0; st <= V_ACK;
            end else begin
              bus_addr <= off; bus_wdata <= d_in;
              if (!write_n) bus_we <= 1'b1; else bus_re <= 1'b1;
              st <= V_WAIT;
            end
          end
        end
        V_WAIT: if (bus_ack) begin
          if (!wr) begin d_out <= bus_rdata; d_oe <= 1'b1; end
          dtack_n <= 1'b0; st <= V_ACK;
        end
        V_ACK: if (!ds_a) begin
          dtack_n <= 1'b1; d_oe <= 1'b0;
          if (blt && as_a) begin off <= off + 24'd4; st <= V_DS; end
          else st <= V_END;
        end
        V_END: if (!as_a) st <= V_IDLE;
        default: st <= V_IDLE;
      endcase
    end
  end
endmodule
