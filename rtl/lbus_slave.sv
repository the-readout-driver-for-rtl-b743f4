// lbus_slave: device end of the local serial bus (see lbus_master for the
// framing). It recognises a command by eight consecutive clocks with ctl
// high, compares the device field with DEV_ID and turns the transfer into a
// register access on its device: reg_we one clock after the last write data
// bit, or reg_re one clock after the command with the device returning
// reg_rdata one clock later, which the slave then drives on the byte lines
// for 8 clocks. Devices that are not addressed keep their lines released.
module lbus_slave #(
  parameter logic [4:0] DEV_ID = 5'd0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        lb_ctl,
  input  logic [3:0]  lb_di,
  output logic [3:0]  lb_do,
  output logic        lb_oe,
  output logic [25:0] reg_addr,
  output logic [31:0] reg_wdata,
  output logic        reg_we,
  output logic        reg_re,
  input  logic [31:0] reg_rdata
);
  logic [31:0] sh;
  logic [3:0]  nctl;
  typedef enum logic [2:0] {L_IDLE, L_WDATA, L_RWAIT, L_RCAP, L_RDRIVE} st_t;
  st_t st;
  logic [3:0]  n;
  logic [31:0] osh;

  // next value of the shift register with the sampled byte-line bits
  function automatic logic [31:0] shift_in(input logic [31:0] v, input logic [3:0] b);
    logic [31:0] r;
    for (int j = 0; j < 4; j++) r[8*j +: 8] = {v[8*j +: 7], b[j]};
    return r;
  endfunction
  logic [31:0] sh_n;
  assign sh_n = shift_in(sh, lb_di);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; nctl <= '0; st <= L_IDLE; n <= '0; osh <= '0;
      lb_do <= '0; lb_oe <= 1'b0; reg_addr <= '0; reg_wdata <= '0; reg_we <= 1'b0; reg_re <= 1'b0;
    end else begin
      reg_we <= 1'b0; reg_re <= 1'b0;
      if (lb_ctl) begin
        sh <= sh_n;
        nctl <= (nctl == 4'd8) ? 4'd8 : nctl + 1'b1;
        st <= L_IDLE; lb_oe <= 1'b0;
        if (nctl == 4'd7 && sh_n[30:26] == DEV_ID) begin
          reg_addr <= sh_n[25:0];
          n <= '0;
          if (sh_n[31]) begin reg_re <= 1'b1; st <= L_RWAIT; end
          else st <= L_WDATA;
        end
      end else begin
        nctl <= '0;
        unique case (st)
          L_WDATA: begin
            sh <= sh_n; n <= n + 1'b1;
            if (n == 4'd7) begin reg_wdata <= sh_n; reg_we <= 1'b1; st <= L_IDLE; end
          end
          L_RWAIT: st <= L_RCAP;
          L_RCAP: begin
            // reg_rdata is valid now (one clock after reg_re)
            osh <= reg_rdata;
            for (int j = 0; j < 4; j++) lb_do[j] <= reg_rdata[8*j + 7];
            lb_oe <= 1'b1; n <= '0; st <= L_RDRIVE;
          end
          L_RDRIVE: begin
            n <= n + 1'b1;
            if (n == 4'd7) begin lb_oe <= 1'b0; lb_do <= '0; st <= L_IDLE; end
            else for (int j = 0; j < 4; j++) lb_do[j] <= osh[8*j + 6 - int'(n)];
          end
          default: ;
        endcase
      end
    end
  end
endmodule
