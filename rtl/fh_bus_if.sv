// fh_bus_if: the CPU-visible registers of FASTHARD.
//
// Seven 16-bit registers are selected by address bits 2..0 and the R/W-N
// line (1 = read, 0 = write):
//   000 HS_TSW          write  bit 0: task-switch handshake
//   001 NEXT_TASK_ID    read   task the CPU is to run next
//   010 BLOCK_TSW       r/w    bit 0: CPU blocks task switches
//   011 CALL_SVC        write  one bit per service call
//   100 HS_SVC          read   bit 0: service call accepted and done
//   101 RETURN_DATA     read   return word of the executing task
//   110 PARAMETER_DATA  write  parameter words of a service call
// An access with the wrong direction for its register has no effect and
// reads as zero. Writes are taken at the clock edge while `cs` is high;
// reads are combinational. Parameter words are written one after the
// other into a small buffer (NPARAM words) in the order of the service
// call's argument list; the buffer index returns to 0 when CALL_SVC is
// written with zero, which ends every service call.
//
// The register set, the address and direction table, the bit-0 handshakes
// and the 16-bit widths follow the original description; the one-cycle
// bus, the parameter buffer with its index, and reading unused register
// bits as zero are this design's choices. OFF_TASK_SWITCH and
// ON_TASK_SWITCH have no CALL_SVC bit: software reads BLOCK_TSW (its old
// value is ALREADY_OFF) and writes it.
module fh_bus_if #(
  parameter int unsigned NTASKS = 256,
  parameter int unsigned DW     = 16,
  parameter int unsigned NPARAM = 4,
  localparam int unsigned TIDW  = $clog2(NTASKS)
) (
  input  logic            clk,
  input  logic            rst_n,
  // CPU bus
  input  logic            cs,
  input  logic            rw_n,
  input  logic [2:0]      adr,
  input  logic [DW-1:0]   wdata,
  output logic [DW-1:0]   rdata,
  // kernel side
  output logic            hs_tsw,
  output logic            block_tsw,
  output logic [DW-1:0]   call_svc,
  output logic [DW-1:0]   params [NPARAM],
  input  logic [TIDW-1:0] next_task_id,
  input  logic            hs_svc,
  input  logic [DW-1:0]   return_data
);
  import fasthard_pkg::*;

  localparam int unsigned PIW = $clog2(NPARAM + 1);
  logic [PIW-1:0] pidx;
  logic           wr, rd;

  assign wr = cs && !rw_n;
  assign rd = cs &&  rw_n;

  always_comb begin
    rdata = '0;
    if (rd) begin
      unique case (adr)
        A_NEXT_TASK_ID: rdata = DW'(next_task_id);
        A_BLOCK_TSW:    rdata = DW'(block_tsw);
        A_HS_SVC:       rdata = DW'(hs_svc);
        A_RETURN_DATA:  rdata = return_data;
        default:        rdata = '0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hs_tsw    <= 1'b0;
      block_tsw <= 1'b0;
      call_svc  <= '0;
      pidx      <= '0;
      for (int i = 0; i < NPARAM; i++) params[i] <= '0;
    end else if (wr) begin
      unique case (adr)
        A_HS_TSW:    hs_tsw    <= wdata[0];
        A_BLOCK_TSW: block_tsw <= wdata[0];
        A_CALL_SVC: begin
          call_svc <= wdata;
          if (wdata == '0) pidx <= '0;
        end
        A_PARAMETER_DATA: if (pidx < PIW'(NPARAM)) begin
          params[pidx[$clog2(NPARAM)-1:0]] <= wdata;
          pidx <= pidx + 1'b1;
        end
        default: ;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   (wr && adr == A_CALL_SVC && wdata != '0) |-> $onehot(wdata))
    else $warning("fh_bus_if: more than one service call bit set");
endmodule
